// tb_daq_buffer -- self-checking test of one 8-deep DAQ buffer.
//
// Fills the buffer through the write port, freezes it, keeps writing (the
// writes must be ignored), reads every entry back and compares with a
// reference copy. After release, new writes must land again. Also checks the
// one-clock read latency and that dout holds while re is low.
module tb_daq_buffer;
  localparam int unsigned W = 32;
  localparam int unsigned D = 8;

  logic         clk = 0, frozen = 0, we = 0, re = 0;
  logic [2:0]   waddr = '0, raddr = '0;
  logic [W-1:0] din = '0, dout;

  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [D];

  daq_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [2:0] a, input logic [W-1:0] d);
    waddr = a; din = d; we = 1;
    @(posedge clk); #1;
    we = 0;
    if (!frozen) ref_mem[a] = d;
  endtask

  task automatic read_check(input logic [2:0] a);
    raddr = a; re = 1;
    @(posedge clk); #1;
    re = 0;
    checks++;
    if (dout !== ref_mem[a]) begin
      failures++; $display("addr %0d: got %h expected %h", a, dout, ref_mem[a]);
    end
    raddr = a + 3'd1;                         // dout must hold while re = 0
    @(posedge clk); #1;
    checks++;
    if (dout !== ref_mem[a]) begin failures++; $display("dout did not hold"); end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int round = 0; round < 20; round++) begin
      frozen = 0;
      for (int i = 0; i < 8 + $urandom_range(0, 8); i++) write(3'(i), $urandom);
      frozen = 1;
      repeat ($urandom_range(1, 10)) write(3'($urandom), $urandom);
      for (int a = 0; a < 8; a++) read_check(3'(a));
      for (int k = 0; k < 8; k++) read_check(3'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
