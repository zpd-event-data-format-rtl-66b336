// tb_event_formatter -- self-checking test of the event formatter.
//
// A model of the two DAQ memories answers the formatter's read port one clock
// after rd_en with random records per (buffer, tick). For every daq_format the
// test builds the expected event row by row, straight from the published
// format table (16-bit rows, LSB column first, first row of a pair in bits
// 15:0), and compares it word by word with the stream, under random
// backpressure. It also checks the event size in bytes against the published
// totals (680 / 520 / 420 / 20), the position of dout_last, rd_done, and the
// one-fetch-per-tick cycle budget.
module tb_event_formatter;
  import zpd_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, dout_ready = 0;
  logic [1:0]  buf_sel = '0;
  logic [4:0]  tag = '0, counter = '0;
  logic [15:0] csr = '0;
  logic [3:0][31:0] diag_words;
  logic        rd_en;
  logic [1:0]  rd_buf;
  logic [2:0]  rd_tick;
  out_rec_t    out_rec;
  in_rec_t     in_rec;
  logic [31:0] dout;
  logic        dout_valid, dout_last, rd_done, busy;

  int checks = 0, failures = 0, stalls = 0;

  out_rec_t m_out [4][8];
  in_rec_t  m_in  [4][8];

  event_formatter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: synchronous read, holds between reads
  always @(posedge clk) if (rd_en) begin
    out_rec <= m_out[rd_buf][rd_tick];
    in_rec  <= m_in[rd_buf][rd_tick];
  end

  function automatic void set_bits(ref logic [15:0] row, input int pos, input int n,
                                   input logic [31:0] v);
    for (int i = 0; i < n; i++) row[pos + i] = v[i];
  endfunction

  // expected event as 16-bit rows
  function automatic void build(input int fmt, input int b, ref logic [15:0] rows [$]);
    logic [15:0] r;
    rows.delete();
    r = '0;
    r[0] = 1; r[1] = 1;
    set_bits(r, 2, 5, tag);
    set_bits(r, 7, 5, counter);
    r[12] = b[1]; r[13] = b[0];
    rows.push_back(r);
    r = '0;
    for (int k = 0; k < 16; k++) r[15 - k] = csr[k];
    rows.push_back(r);
    if (fmt == 0) begin
      for (int k = 0; k < 16; k += 2)
        rows.push_back({diag_words[k/4][8*((k%4)+1) +: 8], diag_words[k/4][8*(k%4) +: 8]});
      return;
    end
    for (int t = 0; t < 8; t++) begin
      for (int f = 0; f < 12; f++) begin
        r = '0;
        set_bits(r, 0, 8, m_out[b][t].track[f].z0);
        set_bits(r, 8, 4, m_out[b][t].track[f].z0_err);
        rows.push_back(r);
        r = '0;
        set_bits(r, 0, 8, m_out[b][t].track[f].curvature);
        set_bits(r, 8, 8, m_out[b][t].track[f].tandip);
        rows.push_back(r);
      end
      r = '0;
      set_bits(r, 0, 8, m_out[b][t].decision);
      rows.push_back(r);
      rows.push_back(16'h0000);
    end
    if (fmt == 3) return;
    rows.push_back(16'h0000);
    rows.push_back(16'h0000);
    for (int t = 0; t < 8; t++) begin
      if (fmt == 1)
        for (int h = 0; h < 10; h++) begin
          r = '0;
          for (int i = 0; i < 16; i++) if (16*h + i < 153) r[i] = m_in[b][t].mask[16*h + i];
          rows.push_back(r);
        end
      for (int j = 0; j < 12; j += 2) begin
        r = '0;
        set_bits(r, 0, 4, m_in[b][t].seed[j].cellloc);
        set_bits(r, 4, 4, m_in[b][t].seed[j].phi);
        set_bits(r, 8, 4, m_in[b][t].seed[j+1].cellloc);
        set_bits(r, 12, 4, m_in[b][t].seed[j+1].phi);
        rows.push_back(r);
      end
    end
  endfunction

  task automatic run_event(input int fmt, input int b, input int ready_pct);
    logic [15:0] rows [$];
    int nw, ncyc, expected_bytes;
    bit got_done;
    tag = 5'($urandom); counter = 5'($urandom); buf_sel = 2'(b);
    csr = {14'($urandom), 2'(fmt)};
    build(fmt, b, rows);
    expected_bytes = (fmt == 1) ? 680 : (fmt == 2) ? 520 : (fmt == 3) ? 420 : 20;
    checks++;
    if (2 * rows.size() != expected_bytes) begin
      failures++; $display("reference size %0d bytes", 2 * rows.size());
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    nw = 0; ncyc = 0; got_done = 0;
    while (!got_done) begin
      dout_ready = ($urandom_range(0, 99) < ready_pct);
      #1;
      if (dout_valid && !dout_ready) stalls++;
      if (dout_valid && dout_ready) begin
        checks++;
        if (nw >= rows.size() / 2 || dout !== {rows[2*nw+1], rows[2*nw]}) begin
          failures++;
          $display("fmt %0d word %0d: got %h expected %h", fmt, nw, dout,
                   (nw < rows.size() / 2) ? {rows[2*nw+1], rows[2*nw]} : 32'h0);
        end
        checks++;
        if (dout_last !== (nw == rows.size() / 2 - 1)) begin
          failures++; $display("fmt %0d word %0d: dout_last %b", fmt, nw, dout_last);
        end
        nw++;
      end
      @(negedge clk);
      ncyc++;
      if (rd_done) got_done = 1;
      if (ncyc > 5000) break;
    end
    dout_ready = 0;
    checks++;
    if (4 * nw != expected_bytes) begin
      failures++; $display("fmt %0d: %0d bytes, expected %0d", fmt, 4 * nw, expected_bytes);
    end
    // with ready always high: one word per clock plus one fetch per tick
    if (ready_pct == 100) begin
      int budget;
      budget = nw + ((fmt == 0) ? 0 : (fmt == 3) ? 8 : 16);
      checks++;
      if (ncyc != budget) begin
        failures++; $display("fmt %0d: %0d cycles, expected %0d", fmt, ncyc, budget);
      end
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after done"); end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) diag_words[k] = $urandom;
    for (int b = 0; b < 4; b++)
      for (int t = 0; t < 8; t++) begin
        m_out[b][t] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                       $urandom, $urandom, $urandom, $urandom, $urandom};
        m_in[b][t]  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                       $urandom, $urandom};
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int fmt = 0; fmt < 4; fmt++) begin
        run_event(fmt, $urandom_range(0, 3), 100);
        run_event(fmt, $urandom_range(0, 3), 60);
      end
    $display("stalled words: %0d", stalls);
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
