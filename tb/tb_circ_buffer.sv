// tb_circ_buffer -- self-checking test of the 64-deep latency buffer.
//
// Writes a stream of random records, one per tick with gaps of random length
// between ticks, and checks that each delivered record equals the one written
// `offset` ticks earlier (64 for offset 0) and that dout_valid follows the
// write by exactly one clock. Several offsets are exercised, including 1, 63
// and 0.
module tb_circ_buffer;
  localparam int unsigned W = 40;
  localparam int unsigned D = 64;

  logic         clk = 0, rst_n = 0, we = 0;
  logic [W-1:0] din = '0;
  logic [5:0]   offset = '0;
  logic [W-1:0] dout;
  logic         dout_valid;

  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  circ_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_tick();
    int unsigned delay;
    din = {$urandom, $urandom};
    we  = 1;
    @(posedge clk); #1;
    we  = 0;
    hist.push_back(din);
    // one clock after the write the delayed record must be on dout
    checks++;
    if (dout_valid !== 1'b1) begin
      failures++; $display("dout_valid missing after tick");
    end
    delay = (offset == 0) ? D : offset;
    if (hist.size() > delay) begin
      checks++;
      if (dout !== hist[hist.size()-1-delay]) begin
        failures++;
        $display("offset %0d: got %h expected %h", offset, dout, hist[hist.size()-1-delay]);
      end
    end
    repeat ($urandom_range(0, 2)) begin
      @(posedge clk); #1;
      checks++;
      if (dout_valid !== 1'b0) begin failures++; $display("dout_valid without tick"); end
    end
  endtask

  initial begin
    int offs[5] = '{1, 5, 17, 63, 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (offs[i]) begin
      offset = 6'(offs[i]);
      repeat (150) do_tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
