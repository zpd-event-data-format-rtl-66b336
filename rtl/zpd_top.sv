// zpd_top -- DAQ data path of one ZPD (z-vertex pre-trigger) module.
//
// Every CLK4 tick the module records two records: the input record (TSF
// segment mask and seed-segment cell/phi bits, kept in the decoder driver)
// and the output record (12 fitted tracks and the 8 decision bits, kept in
// the decision module). Each goes into its own DAQ memory: a 64-tick
// circular buffer that covers the Level 1 latency, feeding four 8-tick DAQ
// buffers with a commissioning-time offset. L1Accept freezes one DAQ buffer
// in both memories; READ_EVENT reads the oldest frozen pair out through the
// event formatter as a 32-bit word stream in the layout chosen by
// daq_format = csr[1:0], then releases it.
//
// Interface: tick strobes the CLK4 data capture (all logic runs on clk);
// offsets set the latency tap of each circular buffer (0 means 64 ticks);
// diag_* writes the debug-mode test bytes; evt_* is the event stream with a
// valid/ready handshake. Status: n_frozen, busy, and one-cycle pulses for a
// dropped L1Accept (overflow) and a dropped READ_EVENT (read_error).
//
// Structure and sizes follow the document. Running both memories from one
// controller and one clock, rather than one per FPGA, is this design's
// simplification: both FPGAs see the same fast-control commands.
module zpd_top
  import zpd_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        tick,
  input  in_rec_t                     in_data,
  input  out_rec_t                    out_data,
  input  logic [$clog2(CIRC_DEPTH)-1:0] in_offset,
  input  logic [$clog2(CIRC_DEPTH)-1:0] out_offset,
  input  logic [15:0]                 csr,
  input  logic                        l1_accept,
  input  logic [4:0]                  trig_tag,
  input  logic [4:0]                  trig_counter,
  input  logic                        read_event,
  input  logic                        diag_we,
  input  logic [15:0]                 diag_addr,
  input  logic [7:0]                  diag_wdata,
  output logic [31:0]                 evt_data,
  output logic                        evt_valid,
  output logic                        evt_last,
  input  logic                        evt_ready,
  output logic [$clog2(NUM_BUF+1)-1:0] n_frozen,
  output logic                        busy,
  output logic                        overflow,
  output logic                        read_error
);

  localparam int unsigned BW = $clog2(NUM_BUF);

  logic          freeze, release_buf, start_rd, rd_done, reading;
  logic [BW-1:0] freeze_sel, release_sel, rd_sel;
  logic [4:0]    rd_tag, rd_counter;
  logic          rd_en;
  logic [BW-1:0] rd_buf;
  logic [2:0]    rd_tick;
  logic [IN_REC_W-1:0]  in_rd;
  logic [OUT_REC_W-1:0] out_rd;
  logic [NUM_BUF-1:0]   in_frozen, out_frozen;
  logic [3:0][31:0]     diag_words;

  daq_ctrl #(.NUM_BUF(NUM_BUF)) u_ctrl (
    .clk, .rst_n, .l1_accept, .trig_tag, .trig_counter, .read_event,
    .rd_done, .freeze, .freeze_sel, .release_buf, .release_sel,
    .start_rd, .rd_sel, .rd_tag, .rd_counter, .n_frozen, .reading,
    .overflow, .read_error
  );

  // decoder driver: input DAQ memory
  daq_memory #(.WIDTH(IN_REC_W), .CIRC_DEPTH(CIRC_DEPTH), .DEPTH(TICKS),
               .NUM_BUF(NUM_BUF)) u_in_mem (
    .clk, .rst_n, .tick, .din(in_data), .offset(in_offset),
    .freeze, .freeze_sel, .release_buf, .release_sel,
    .rd_en, .rd_buf, .rd_tick, .rd_data(in_rd), .frozen(in_frozen)
  );

  // decision module: output DAQ memory
  daq_memory #(.WIDTH(OUT_REC_W), .CIRC_DEPTH(CIRC_DEPTH), .DEPTH(TICKS),
               .NUM_BUF(NUM_BUF)) u_out_mem (
    .clk, .rst_n, .tick, .din(out_data), .offset(out_offset),
    .freeze, .freeze_sel, .release_buf, .release_sel,
    .rd_en, .rd_buf, .rd_tick, .rd_data(out_rd), .frozen(out_frozen)
  );

  diag_mem u_diag (
    .clk, .rst_n, .we(diag_we), .addr(diag_addr), .wdata(diag_wdata),
    .words(diag_words)
  );

  event_formatter #(.N_BUF(NUM_BUF)) u_fmt (
    .clk, .rst_n, .start(start_rd), .buf_sel(rd_sel), .tag(rd_tag),
    .counter(rd_counter), .csr, .diag_words,
    .rd_en, .rd_buf, .rd_tick,
    .out_rec(out_rec_t'(out_rd)), .in_rec(in_rec_t'(in_rd)),
    .dout(evt_data), .dout_valid(evt_valid), .dout_last(evt_last),
    .dout_ready(evt_ready), .rd_done, .busy
  );

  // Both memories are driven by the same commands and must agree.
  a_frozen_match: assert property (@(posedge clk) disable iff (!rst_n)
                                   in_frozen == out_frozen);
  // The formatter only runs while the controller has a readout open.
  a_busy_reading: assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> reading);

endmodule
