// vision_chip_top: single-chip spiking vision system.
//
// A gated SPAD image sensor produces 1-bit spike maps at up to 100,000 maps/s;
// a reconfigurable array of integrate-and-fire PEs processes them as spikes,
// either as a pixel-wise preprocessor (temporal accumulation, denoising
// f-function, iToF depth solving, rate coding back into spikes) or as a
// spiking CNN (convolution on PE chains with shared weights, pooling, fully
// connected and spike-counting layers, with 1024 neurons). A light-change
// detector closes the loop from the spike stream back to the sensor exposure.
//
// Data flow:
//   imaging_ctrl --RST/gate--> spad_pixel_array --rows--> sensor_if --> data_sram (port B)
//                                            \--rows--> light_adapt --exposure--> imaging_ctrl
//   inst_sram --> pe_ctrl --command--> pe_array <--> data_sram (port A)
//
// The MPU that configures the chip is not part of this RTL: its side of every
// interface is a host_* port. The host loads programs (host_i*), reads and
// writes the data SRAM while the processor is idle (host_d*), starts a program
// (host_start/host_start_pc, host_done pulses at HALT) and sets the imaging
// controls. photon[] is the avalanche input of the SPAD model for each pixel.
//
// The parts and their connection follow the modelled chip; the host port
// set, the memory layout and the instruction set are this design's own.
module vision_chip_top
  import vc_pkg::*;
#(
  parameter int unsigned ROWS         = 128,
  parameter int unsigned COLS         = 128,
  parameter int unsigned NPE          = 256,
  parameter int unsigned DS_DEPTH     = 512,
  parameter int unsigned IS_DEPTH     = 8192,
  parameter int unsigned FRAME_CYCLES = 800,
  parameter int unsigned ROW_CYCLES   = 6,
  parameter int unsigned MOD_CYCLES   = 8,
  localparam int unsigned DAW         = $clog2(DS_DEPTH),
  localparam int unsigned IAW         = $clog2(IS_DEPTH),
  localparam int unsigned DW          = NPE * VW,
  localparam int unsigned LCW         = $clog2(8*8*16 + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // scene
  input  logic [ROWS*COLS-1:0] photon,
  output logic                 laser_mod,
  // imaging controls
  input  logic                 host_img_en,
  input  img_mode_e            host_img_mode,
  input  logic [1:0]           host_img_phase,
  input  logic [DAW-1:0]       host_map_base,
  input  logic                 host_map_clear,
  output logic [15:0]          host_frame_idx,
  output logic [3:0]           host_map_slot,
  // light adaptation
  input  logic                 host_la_en,
  input  logic [LCW-1:0]       host_la_thr,
  input  logic [4:0]           host_la_window,
  input  logic                 host_exp_load,
  input  logic [15:0]          host_exp_value,
  output logic [15:0]          host_exposure,
  output logic                 host_light_changed,
  output logic                 host_light_brighter,
  output logic [LCW-1:0]       host_light_cnt,
  // program memory
  input  logic                 host_iwe,
  input  logic [IAW-1:0]       host_iaddr,
  input  logic [IW-1:0]        host_iwdata,
  // data memory (while the processor is idle)
  input  logic                 host_den,
  input  logic                 host_dwe,
  input  logic [DAW-1:0]       host_daddr,
  input  logic [DW-1:0]        host_dwdata,
  output logic [DW-1:0]        host_drdata,
  // processor control
  input  logic                 host_start,
  input  logic [IAW-1:0]       host_start_pc,
  output logic                 host_running,
  output logic                 host_done
);

  localparam int unsigned RAW = $clog2(ROWS);

  // ---------------- sensor ----------------
  logic [ROWS-1:0] row_rst, row_gate;
  logic            rd_en, frame_start, frame_done;
  logic [RAW-1:0]  rd_row;
  logic [15:0]     exposure, exp_cur;
  logic            px_valid;
  logic [RAW-1:0]  px_row;
  logic [COLS-1:0] px_data;

  imaging_ctrl #(
    .ROWS(ROWS), .FRAME_CYCLES(FRAME_CYCLES), .ROW_CYCLES(ROW_CYCLES), .MOD_CYCLES(MOD_CYCLES)
  ) u_img (
    .clk(clk), .rst_n(rst_n), .en(host_img_en), .mode(host_img_mode), .phase(host_img_phase),
    .exposure(exposure), .row_rst(row_rst), .row_gate(row_gate), .rd_en(rd_en), .rd_row(rd_row),
    .frame_start(frame_start), .frame_done(frame_done), .frame_idx(host_frame_idx),
    .laser_mod(laser_mod), .exp_cur(exp_cur)
  );

  spad_pixel_array #(.ROWS(ROWS), .COLS(COLS)) u_spad (
    .clk(clk), .rst_n(rst_n), .photon(photon), .row_rst(row_rst), .row_gate(row_gate),
    .rd_en(rd_en), .rd_row(rd_row), .rd_valid(px_valid), .rd_row_o(px_row), .rd_data(px_data)
  );

  light_adapt #(
    .ROWS(ROWS), .COLS(COLS), .SUB(8), .EXP_MIN(1), .EXP_MAX(FRAME_CYCLES - 2)
  ) u_la (
    .clk(clk), .rst_n(rst_n), .en(host_la_en), .thr(host_la_thr), .window(host_la_window),
    .exp_load(host_exp_load), .exp_value(host_exp_value), .rd_valid(px_valid), .rd_row(px_row),
    .rd_data(px_data), .exposure(exposure), .changed(host_light_changed), .brighter(host_light_brighter),
    .cnt_last(host_light_cnt)
  );
  assign host_exposure = exp_cur;

  // spike maps into the data memory
  logic          b_we, frame_tick;
  logic [DAW-1:0] b_addr;
  logic [DW-1:0] b_mask, b_wdata;

  sensor_if #(.ROWS(ROWS), .COLS(COLS), .LANES(NPE), .LW(VW), .AW(DAW)) u_sif (
    .clk(clk), .rst_n(rst_n), .clear(host_map_clear), .base(host_map_base),
    .rd_valid(px_valid), .rd_row(px_row), .rd_data(px_data),
    .b_we(b_we), .b_addr(b_addr), .b_mask(b_mask), .b_wdata(b_wdata),
    .frame_tick(frame_tick), .slot(host_map_slot)
  );

  // ---------------- processor ----------------
  logic            i_re;
  logic [IAW-1:0]  i_addr;
  logic [IW-1:0]   i_rdata;
  logic            c_den, c_dwe;
  logic [DAW-1:0]  c_daddr;
  pe_cmd_t         cmd;
  logic [2:0]      chain_log;
  logic            array_busy;
  logic [DW-1:0]   a_rdata, a_wdata, arr_wdata;
  logic            a_en, a_we;
  logic [DAW-1:0]  a_addr;

  inst_sram #(.DEPTH(IS_DEPTH), .W(IW)) u_isram (
    .clk(clk), .we(host_iwe), .waddr(host_iaddr), .wdata(host_iwdata),
    .re(i_re), .raddr(i_addr), .rdata(i_rdata)
  );

  pe_ctrl #(.IS_DEPTH(IS_DEPTH), .DS_DEPTH(DS_DEPTH), .LANES(NPE)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(host_start), .start_pc(host_start_pc),
    .running(host_running), .done(host_done), .frame_tick(frame_tick),
    .i_re(i_re), .i_addr(i_addr), .i_rdata(i_rdata),
    .d_en(c_den), .d_we(c_dwe), .d_addr(c_daddr), .d_rdata(a_rdata),
    .cmd(cmd), .chain_log(chain_log), .array_busy(array_busy)
  );

  pe_array #(.NPE(NPE)) u_array (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .chain_log(chain_log),
    .rd_data(a_rdata), .wr_data(arr_wdata), .spk(), .spk_out(), .busy(array_busy)
  );

  // port A belongs to the sequencer while a program runs, else to the host
  assign a_en    = host_running ? c_den   : host_den;
  assign a_we    = host_running ? c_dwe   : host_dwe;
  assign a_addr  = host_running ? c_daddr : host_daddr;
  assign a_wdata = host_running ? arr_wdata : host_dwdata;
  assign host_drdata = a_rdata;

  data_sram #(.DEPTH(DS_DEPTH), .LANES(NPE), .LW(VW)) u_dsram (
    .clk(clk), .a_en(a_en), .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata), .a_rdata(a_rdata),
    .b_we(b_we), .b_addr(b_addr), .b_mask(b_mask), .b_wdata(b_wdata)
  );

endmodule
