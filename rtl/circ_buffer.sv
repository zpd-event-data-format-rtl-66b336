// circ_buffer -- Level 1 latency buffer of the ZPD DAQ memories.
//
// One record is written per CLK4 tick (we = 1) at a free-running write
// pointer that wraps after DEPTH entries. In the same cycle the entry
// `offset` places behind the write pointer is read, so dout presents the
// record written `offset` ticks earlier (DEPTH ticks for offset = 0, as the
// read happens before the write). dout and dout_valid are registered: they
// appear one clock after the tick. The read stream feeds the DAQ buffers.
//
// DEPTH = 64 (17.2 us at CLK4) and the offset tap follow the document; the
// offset is a run-time input because its value is set at commissioning.
// The record is stored as one wide word per tick; the physical 16- or 32-bit
// wide double-buffered RAM organisation is not reproduced.
module circ_buffer #(
  parameter int unsigned WIDTH = 249,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,          // CLK4 tick: write din
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    offset,      // read distance behind the write pointer
  output logic [WIDTH-1:0] dout,        // record written `offset` ticks ago
  output logic             dout_valid   // one-cycle pulse, one clock after we
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr;

  always_ff @(posedge clk) begin
    if (we) begin
      mem[wptr] <= din;
      dout      <= mem[wptr - offset];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= we;
      if (we) wptr <= wptr + 1'b1;
    end
  end

endmodule
