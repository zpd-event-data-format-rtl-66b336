// daq_memory -- one ZPD DAQ memory: a circular buffer feeding four DAQ buffers.
//
// Every CLK4 tick the record on din enters the circular buffer. The record
// written `offset` ticks earlier comes out one clock later and is copied into
// every DAQ buffer that is not frozen, at a write pointer shared by all of
// them (mod DEPTH). So while a run goes on, all free DAQ buffers hold the same
// last DEPTH delayed ticks, as in the document's scheme where the DAQ buffers
// are filled before the L1Accept arrives.
//
// freeze (one-cycle pulse, buffer freeze_sel) stops writes into that buffer
// and remembers where its oldest tick sits: the shared pointer after any
// write happening in the same cycle. release (pulse, release_sel) returns it
// to filling. The read port addresses a buffer and a tick T (0 = oldest);
// rd_data is valid one clock after rd_en and holds until the next rd_en.
//
// Interface: plain signals. The two instances in the ZPD (decoder driver and
// decision module) differ only in WIDTH; each keeps its own pointers, as the
// two FPGAs do.
module daq_memory #(
  parameter int unsigned WIDTH      = 249,
  parameter int unsigned CIRC_DEPTH = 64,
  parameter int unsigned DEPTH      = 8,
  parameter int unsigned NUM_BUF    = 4,
  localparam int unsigned CAW = $clog2(CIRC_DEPTH),
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned BW  = $clog2(NUM_BUF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,          // CLK4 strobe: record din
  input  logic [WIDTH-1:0] din,
  input  logic [CAW-1:0]   offset,        // latency offset (commissioning value)
  input  logic             freeze,
  input  logic [BW-1:0]    freeze_sel,
  input  logic             release_buf,
  input  logic [BW-1:0]    release_sel,
  input  logic             rd_en,
  input  logic [BW-1:0]    rd_buf,
  input  logic [AW-1:0]    rd_tick,       // 0 = oldest tick of the frozen buffer
  output logic [WIDTH-1:0] rd_data,
  output logic [NUM_BUF-1:0] frozen
);

  logic [WIDTH-1:0] cb_dout;
  logic             cb_valid;
  logic [AW-1:0]    wptr, wptr_next;
  logic [AW-1:0]    start [NUM_BUF];
  logic [WIDTH-1:0] buf_dout [NUM_BUF];
  logic [BW-1:0]    rd_buf_q;

  circ_buffer #(.WIDTH(WIDTH), .DEPTH(CIRC_DEPTH)) u_circ (
    .clk, .rst_n, .we(tick), .din, .offset,
    .dout(cb_dout), .dout_valid(cb_valid)
  );

  assign wptr_next = cb_valid ? AW'(wptr + 1'b1) : wptr;

  for (genvar b = 0; b < NUM_BUF; b++) begin : g_buf
    daq_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_buf (
      .clk,
      .frozen (frozen[b]),
      .we     (cb_valid),
      .waddr  (wptr),
      .din    (cb_dout),
      .re     (rd_en && rd_buf == BW'(b)),
      .raddr  (AW'(start[b] + rd_tick)),
      .dout   (buf_dout[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      frozen   <= '0;
      rd_buf_q <= '0;
      for (int b = 0; b < NUM_BUF; b++) start[b] <= '0;
    end else begin
      wptr <= wptr_next;
      if (rd_en) rd_buf_q <= rd_buf;
      if (release_buf) frozen[release_sel] <= 1'b0;
      if (freeze) begin
        frozen[freeze_sel] <= 1'b1;
        start[freeze_sel]  <= wptr_next;
      end
    end
  end

  assign rd_data = buf_dout[rd_buf_q];

  // The controller never freezes a buffer that is already frozen.
  a_freeze_free: assert property (@(posedge clk) disable iff (!rst_n)
                                  freeze |-> !frozen[freeze_sel]);

endmodule
