// daq_buffer -- one 8-event-deep DAQ (event) buffer.
//
// While not frozen the buffer takes every record the circular buffer
// delivers (we) at the write address given by the DAQ memory's shared
// pointer, so it always holds the last DEPTH delivered ticks. Once frozen
// it ignores writes and keeps its contents for readout. Reads are
// synchronous: dout updates one clock after re with the entry at raddr and
// holds it until the next re.
//
// DEPTH = 8 (2.2 us at CLK4) and "frozen" semantics follow the document; the
// single wide word per tick (instead of 16-bit rows) is this design's choice.
module daq_buffer #(
  parameter int unsigned WIDTH = 249,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             frozen,      // 1: contents held for readout
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] din,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !frozen) mem[waddr] <= din;
    if (re)            dout       <= mem[raddr];
  end

endmodule
