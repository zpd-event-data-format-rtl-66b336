// tb_daq_memory -- self-checking test of one DAQ memory (circular buffer +
// four DAQ buffers).
//
// A record is written every 4 clocks. Buffers are frozen at random moments in
// a random order; each frozen buffer must then hold, as ticks T = 0..7, the
// eight records written offset+7 .. offset ticks before the freeze, and keep
// them while the run goes on and other buffers are frozen, read and released.
// The frozen flags are checked after every freeze and release. Freezes fall
// on the same clock edge as the delayed write of the last tick or after it;
// either way that tick must be the newest one in the frozen buffer.
module tb_daq_memory;
  localparam int unsigned W = 36;

  logic         clk = 0, rst_n = 0, tick = 0;
  logic [W-1:0] din = '0;
  logic [5:0]   offset;
  logic         freeze = 0, release_buf = 0, rd_en = 0;
  logic [1:0]   freeze_sel = '0, release_sel = '0, rd_buf = '0;
  logic [2:0]   rd_tick = '0;
  logic [W-1:0] rd_data;
  logic [3:0]   frozen;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  logic [W-1:0] hist [$];
  logic [W-1:0] expect_buf [4][8];
  logic [3:0]   model_frozen = '0;

  daq_memory #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tick generator: one record every 4 clocks once out of reset
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cyc % 4 == 0) begin
      tick = 1;
      din  = {$urandom, $urandom};
      hist.push_back(din);
    end else begin
      tick = 0;
    end
  end

  // wait until the given phase after a tick: phase 1 puts the freeze on the
  // same clock edge as the delayed write of the tick, phases 2 and 3 after it
  task automatic wait_phase(input int ph);
    do @(negedge clk); while (cyc % 4 != ph);
  endtask

  task automatic do_freeze(input int b);
    int unsigned k, L;
    wait_phase($urandom_range(1, 3));
    k = hist.size() - 1;
    L = (offset == 0) ? 64 : offset;
    for (int t = 0; t < 8; t++) expect_buf[b][t] = hist[k - L - 7 + t];
    freeze = 1; freeze_sel = 2'(b);
    @(negedge clk);
    freeze = 0;
    model_frozen[b] = 1;
    checks++;
    if (frozen !== model_frozen) begin
      failures++; $display("frozen %b expected %b", frozen, model_frozen);
    end
  endtask

  task automatic do_release(input int b);
    wait_phase(2);
    release_buf = 1; release_sel = 2'(b);
    @(negedge clk);
    release_buf = 0;
    model_frozen[b] = 0;
    checks++;
    if (frozen !== model_frozen) begin
      failures++; $display("frozen %b expected %b", frozen, model_frozen);
    end
  endtask

  task automatic check_buf(input int b);
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      rd_en = 1; rd_buf = 2'(b); rd_tick = 3'(t);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== expect_buf[b][t]) begin
        failures++;
        $display("buf %0d tick %0d: got %h expected %h", b, t, rd_data, expect_buf[b][t]);
      end
    end
  endtask

  initial begin
    offset = 6'd20;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      offset = (round == 5) ? 6'd0 : 6'($urandom_range(1, 63));
      repeat (80) @(posedge clk);             // > 64 ticks + 8 of history
      repeat (300) @(posedge clk);
      for (int b = 0; b < 4; b++) begin
        int pick;
        pick = (b + round) % 4;
        do_freeze(pick);
        repeat ($urandom_range(4, 60)) @(posedge clk);
      end
      for (int b = 0; b < 4; b++) check_buf(b);
      // release two, let them refill and freeze them again
      do_release(round % 4);
      do_release((round + 2) % 4);
      repeat (40) @(posedge clk);
      do_freeze(round % 4);
      repeat (13) @(posedge clk);
      do_freeze((round + 2) % 4);
      repeat (20) @(posedge clk);
      for (int b = 0; b < 4; b++) check_buf(b);
      for (int b = 0; b < 4; b++) do_release(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
