// tb_zpd_top -- end-to-end test of the ZPD DAQ path at its full size.
//
// Random input and output records enter every 4 clocks (one CLK4 tick). The
// test issues L1Accepts and READ_EVENTs in random bursts with random
// daq_format values and random backpressure on the event stream, and checks
// every event word against an expected event built from a history of the
// records: the eight ticks that sat `offset` ticks behind the write pointer
// when the L1Accept came, laid out row by row as the published format table
// gives them. It also checks event sizes (680 / 520 / 420 / 20 bytes),
// n_frozen, and the overflow / read_error pulses.
//
// Mechanisms that must each happen at least once: buffer freeze, reuse of a
// released buffer, readout in each of the four daq_formats, L1Accept
// overflow with all four buffers frozen, READ_EVENT with nothing frozen,
// READ_EVENT during a readout, backpressure stalls, and the 64-tick latency
// (offset 0).
module tb_zpd_top;
  import zpd_pkg::*;

  logic        clk = 0, rst_n = 0, tick = 0;
  in_rec_t     in_data;
  out_rec_t    out_data;
  logic [5:0]  in_offset = 6'd45, out_offset = 6'd47;
  logic [15:0] csr = 16'h0001;
  logic        l1_accept = 0, read_event = 0, diag_we = 0, evt_ready = 0;
  logic [4:0]  trig_tag = '0, trig_counter = '0;
  logic [15:0] diag_addr = '0;
  logic [7:0]  diag_wdata = '0;
  logic [31:0] evt_data;
  logic        evt_valid, evt_last, busy, overflow, read_error;
  logic [2:0]  n_frozen;

  zpd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  in_rec_t  in_hist [$];
  out_rec_t out_hist [$];
  logic [7:0] diag_bytes [16];

  typedef struct {
    int         b;
    logic [4:0] tag, cnt;
    in_rec_t    in_r  [8];
    out_rec_t   out_r [8];
  } ev_t;
  ev_t     frozen_q [$];
  int      wr_ptr = 0;
  logic [31:0] exp_words [$];
  int      exp_len = 0, got_words = 0, events_done = 0;

  // mechanism counters
  int n_freeze = 0, n_reuse = 0, n_ovf_exp = 0, n_ovf_seen = 0;
  int n_rderr_exp = 0, n_rderr_seen = 0, n_read_busy = 0, n_stall = 0, n_off0 = 0;
  int n_fmt [4] = '{0, 0, 0, 0};
  bit used [4] = '{0, 0, 0, 0};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CLK4 tick generator
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cyc % 4 == 0) begin
      tick = 1;
      for (int i = 0; i < $bits(in_rec_t); i += 32)  in_data[i +: 32]  = $urandom;
      for (int i = 0; i < $bits(out_rec_t); i += 32) out_data[i +: 32] = $urandom;
      in_hist.push_back(in_data);
      out_hist.push_back(out_data);
    end else begin
      tick = 0;
    end
  end

  // event stream monitor with random backpressure
  always @(negedge clk) begin
    evt_ready = ($urandom_range(0, 99) < 75);
  end
  always @(posedge clk) if (rst_n) begin
    if (overflow)   n_ovf_seen++;
    if (read_error) n_rderr_seen++;
    if (evt_valid && !evt_ready) n_stall++;
    if (evt_valid && evt_ready) begin
      checks++;
      if (exp_words.size() == 0) begin
        failures++; $display("unexpected word %h", evt_data);
      end else begin
        if (evt_data !== exp_words[0]) begin
          failures++;
          $display("event %0d word %0d: got %h expected %h", events_done, got_words,
                   evt_data, exp_words[0]);
        end
        void'(exp_words.pop_front());
      end
      got_words++;
      checks++;
      if (evt_last !== (exp_words.size() == 0)) begin
        failures++; $display("evt_last %b at word %0d", evt_last, got_words - 1);
      end
      if (evt_last) begin
        checks++;
        if (got_words != exp_len) begin
          failures++; $display("event length %0d words, expected %0d", got_words, exp_len);
        end
        got_words = 0;
        events_done++;
      end
    end
  end

  // ---- expected event, row by row from the format table ----
  function automatic void put(ref logic [15:0] r, input int pos, input int n, input logic [31:0] v);
    for (int i = 0; i < n; i++) r[pos + i] = v[i];
  endfunction

  function automatic void build(input ev_t e, input int fmt, input logic [15:0] c);
    logic [15:0] rows [$];
    logic [15:0] r;
    r = '0; r[0] = 1; r[1] = 1;
    put(r, 2, 5, e.tag); put(r, 7, 5, e.cnt);
    r[12] = e.b[1]; r[13] = e.b[0];
    rows.push_back(r);
    for (int k = 0; k < 16; k++) r[15 - k] = c[k];
    rows.push_back(r);
    if (fmt == 0) begin
      for (int k = 0; k < 16; k += 2) rows.push_back({diag_bytes[k+1], diag_bytes[k]});
    end else begin
      for (int t = 0; t < 8; t++) begin
        for (int f = 0; f < 12; f++) begin
          r = '0; put(r, 0, 8, e.out_r[t].track[f].z0); put(r, 8, 4, e.out_r[t].track[f].z0_err);
          rows.push_back(r);
          r = '0; put(r, 0, 8, e.out_r[t].track[f].curvature); put(r, 8, 8, e.out_r[t].track[f].tandip);
          rows.push_back(r);
        end
        r = '0; put(r, 0, 8, e.out_r[t].decision);
        rows.push_back(r);
        rows.push_back(16'h0);
      end
      if (fmt != 3) begin
        rows.push_back(16'h0); rows.push_back(16'h0);
        for (int t = 0; t < 8; t++) begin
          if (fmt == 1)
            for (int h = 0; h < 10; h++) begin
              r = '0;
              for (int i = 0; i < 16; i++) if (16*h + i < 153) r[i] = e.in_r[t].mask[16*h + i];
              rows.push_back(r);
            end
          for (int j = 0; j < 12; j += 2) begin
            r = '0;
            put(r, 0, 4, e.in_r[t].seed[j].cellloc);   put(r, 4, 4, e.in_r[t].seed[j].phi);
            put(r, 8, 4, e.in_r[t].seed[j+1].cellloc); put(r, 12, 4, e.in_r[t].seed[j+1].phi);
            rows.push_back(r);
          end
        end
      end
    end
    checks++;
    if (2 * rows.size() != ((fmt == 1) ? 680 : (fmt == 2) ? 520 : (fmt == 3) ? 420 : 20)) begin
      failures++; $display("reference event size %0d bytes for format %0d", 2 * rows.size(), fmt);
    end
    for (int k = 0; k < rows.size(); k += 2) exp_words.push_back({rows[k+1], rows[k]});
    exp_len = rows.size() / 2;
  endfunction

  task automatic wait_quiet();
    do @(negedge clk); while (cyc % 4 != 2);
  endtask

  task automatic check_nfrozen();
    checks++;
    if (n_frozen != 3'(frozen_q.size())) begin
      failures++; $display("n_frozen %0d expected %0d", n_frozen, frozen_q.size());
    end
  endtask

  task automatic do_l1();
    ev_t e;
    int k, li, lo;
    wait_quiet();
    trig_tag = 5'($urandom); trig_counter = 5'($urandom);
    l1_accept = 1;
    if (frozen_q.size() == 4) begin
      n_ovf_exp++;
    end else begin
      k  = in_hist.size() - 1;
      li = (in_offset == 0) ? 64 : in_offset;
      lo = (out_offset == 0) ? 64 : out_offset;
      e.b = wr_ptr; e.tag = trig_tag; e.cnt = trig_counter;
      for (int t = 0; t < 8; t++) begin
        e.in_r[t]  = in_hist[k - li - 7 + t];
        e.out_r[t] = out_hist[k - lo - 7 + t];
      end
      frozen_q.push_back(e);
      if (used[wr_ptr]) n_reuse++;
      used[wr_ptr] = 1;
      wr_ptr = (wr_ptr + 1) % 4;
      n_freeze++;
      if (in_offset == 0) n_off0++;
    end
    @(negedge clk);
    l1_accept = 0;
    repeat (3) @(negedge clk);
    check_nfrozen();
  endtask

  task automatic do_read();
    int fmt, ev0;
    fmt = $urandom_range(0, 3);
    @(negedge clk);
    csr = {14'($urandom), 2'(fmt)};
    read_event = 1;
    if (frozen_q.size() == 0) begin
      n_rderr_exp++;
      @(negedge clk);
      read_event = 0;
      return;
    end
    build(frozen_q[0], fmt, csr);
    ev0 = events_done;
    n_fmt[fmt]++;
    @(negedge clk);
    read_event = 0;
    // sometimes a second READ_EVENT while the readout runs: it must be dropped
    if ($urandom_range(0, 2) == 0) begin
      repeat (3) @(negedge clk);
      read_event = 1; n_rderr_exp++; n_read_busy++;
      @(negedge clk);
      read_event = 0;
    end
    while (events_done == ev0 || busy) @(negedge clk);
    void'(frozen_q.pop_front());
    repeat (3) @(negedge clk);
    check_nfrozen();
  endtask

  initial begin
    foreach (diag_bytes[i]) diag_bytes[i] = '0;
    in_data = '0; out_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // debug-mode test bytes
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      diag_we = 1; diag_addr = 16'h4000 + 16'(i); diag_wdata = 8'($urandom);
      diag_bytes[i] = diag_wdata;
    end
    @(negedge clk);
    diag_we = 0;
    do_read();                                  // nothing frozen yet: dropped
    repeat (4 * 80) @(negedge clk);             // fill the 64-tick history
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin
        in_offset = 6'd0; out_offset = 6'd0;    // full 64-tick latency
        repeat (4 * 80) @(negedge clk);
      end
      for (int burst = 0; burst < 6; burst++) begin
        int nl, nr;
        nl = $urandom_range(1, 6);
        for (int i = 0; i < nl; i++) begin
          do_l1();
          repeat ($urandom_range(0, 30)) @(negedge clk);
        end
        nr = $urandom_range(1, 5);
        for (int i = 0; i < nr; i++) do_read();
        repeat (48) @(negedge clk);             // released buffers refill
      end
      while (frozen_q.size() > 0) do_read();
      repeat (48) @(negedge clk);
    end
    repeat (10) @(negedge clk);

    checks++; if (n_ovf_seen != n_ovf_exp) begin failures++; $display("overflow pulses %0d expected %0d", n_ovf_seen, n_ovf_exp); end
    checks++; if (n_rderr_seen != n_rderr_exp) begin failures++; $display("read_error pulses %0d expected %0d", n_rderr_seen, n_rderr_exp); end
    checks++; if (exp_words.size() != 0) begin failures++; $display("%0d words missing", exp_words.size()); end
    $display("freezes=%0d reuses=%0d overflows=%0d dropped_reads=%0d reads_while_busy=%0d stalls=%0d offset0_events=%0d",
             n_freeze, n_reuse, n_ovf_exp, n_rderr_exp, n_read_busy, n_stall, n_off0);
    $display("events per daq_format: debug=%0d full=%0d short=%0d decision_only=%0d",
             n_fmt[0], n_fmt[1], n_fmt[2], n_fmt[3]);
    checks++; if (n_freeze == 0)    begin failures++; $display("no freeze"); end
    checks++; if (n_reuse == 0)     begin failures++; $display("no buffer reuse"); end
    checks++; if (n_ovf_exp == 0)   begin failures++; $display("no overflow"); end
    checks++; if (n_rderr_exp == n_read_busy) begin failures++; $display("no READ_EVENT with nothing frozen"); end
    checks++; if (n_read_busy == 0) begin failures++; $display("no READ_EVENT during readout"); end
    checks++; if (n_stall == 0)     begin failures++; $display("no backpressure stall"); end
    checks++; if (n_off0 == 0)      begin failures++; $display("no 64-tick latency event"); end
    for (int f = 0; f < 4; f++) begin
      checks++; if (n_fmt[f] == 0) begin failures++; $display("daq_format %0d never read", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
