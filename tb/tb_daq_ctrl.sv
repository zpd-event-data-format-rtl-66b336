// tb_daq_ctrl -- self-checking test of the DAQ buffer controller.
//
// Drives random L1Accept, READ_EVENT and readout-done commands and compares
// every registered output, every clock, with a reference model that keeps
// the frozen buffers as a FIFO of (buffer, tag, counter). Counts and
// requires at least one freeze, one readout, one overflow (L1Accept with
// four buffers frozen) and one dropped READ_EVENT.
module tb_daq_ctrl;
  logic       clk = 0, rst_n = 0;
  logic       l1_accept = 0, read_event = 0, rd_done = 0;
  logic [4:0] trig_tag = '0, trig_counter = '0;
  logic       freeze, release_buf, start_rd, reading, overflow, read_error;
  logic [1:0] freeze_sel, release_sel, rd_sel;
  logic [4:0] rd_tag, rd_counter;
  logic [2:0] n_frozen;

  int checks = 0, failures = 0;
  int n_freeze = 0, n_start = 0, n_overflow = 0, n_rderr = 0;

  daq_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  typedef struct { int b; logic [4:0] tag; logic [4:0] cnt; } ev_t;
  ev_t q [$];
  int  wr_ptr = 0;
  bit  m_reading = 0;
  // expected registered outputs
  bit  e_freeze, e_release, e_start, e_ovf, e_rderr;
  int  e_fsel, e_rsel, e_sel;
  logic [4:0] e_tag, e_cnt;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    e_fsel = 0; e_rsel = 0; e_sel = 0; e_tag = 0; e_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit acc, st, dn;
      @(negedge clk);
      // new random inputs
      l1_accept    = ($urandom_range(0, 99) < 20);
      read_event   = ($urandom_range(0, 99) < 15);
      rd_done      = ($urandom_range(0, 99) < 12);
      trig_tag     = 5'($urandom);
      trig_counter = 5'($urandom);
      // model the next clock edge
      acc = l1_accept && q.size() < 4;
      st  = read_event && !m_reading && q.size() > 0;
      dn  = rd_done && m_reading;
      e_freeze = acc; e_release = dn; e_start = st;
      e_ovf = l1_accept && !acc;
      e_rderr = read_event && !st;
      if (st) begin e_sel = q[0].b; e_tag = q[0].tag; e_cnt = q[0].cnt; end
      if (acc) begin
        e_fsel = wr_ptr;
        q.push_back('{wr_ptr, trig_tag, trig_counter});
        wr_ptr = (wr_ptr + 1) % 4;
      end
      if (st) m_reading = 1;
      if (dn) begin
        e_rsel = q[0].b;
        void'(q.pop_front());
        m_reading = 0;
      end
      @(posedge clk); #1;
      check("freeze", freeze, e_freeze);
      if (e_freeze) check("freeze_sel", freeze_sel, e_fsel);
      check("release", release_buf, e_release);
      if (e_release) check("release_sel", release_sel, e_rsel);
      check("start_rd", start_rd, e_start);
      if (e_start) begin
        check("rd_sel", rd_sel, e_sel);
        check("rd_tag", rd_tag, e_tag);
        check("rd_counter", rd_counter, e_cnt);
      end
      check("overflow", overflow, e_ovf);
      check("read_error", read_error, e_rderr);
      check("n_frozen", n_frozen, q.size());
      check("reading", reading, m_reading);
      n_freeze += e_freeze; n_start += e_start; n_overflow += e_ovf; n_rderr += e_rderr;
    end
    $display("freezes=%0d readouts=%0d overflows=%0d dropped_reads=%0d",
             n_freeze, n_start, n_overflow, n_rderr);
    checks++; if (n_freeze == 0)   failures++;
    checks++; if (n_start == 0)    failures++;
    checks++; if (n_overflow == 0) failures++;
    checks++; if (n_rderr == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
