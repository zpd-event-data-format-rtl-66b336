// tb_zpd_pkg -- self-checking test of the shared sizes and packing functions.
//
// Checks the record widths (249 and 344 bits), the event lengths per
// daq_format against the published byte totals, and the header, track,
// decision, mask and seed rows against bit-by-bit expectations taken from
// the format table, for random field values.
module tb_zpd_pkg;
  import zpd_pkg::*;

  int checks = 0, failures = 0;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_rec_t  ir;
    out_rec_t orr;
    logic [4:0] tag, cnt;
    logic [1:0] bf;
    logic [15:0] csr, r0, r1;
    logic [31:0] w;

    chk("IN_REC_W", IN_REC_W, 249);
    chk("OUT_REC_W", OUT_REC_W, 344);
    chk("full bytes",  4 * event_words(FMT_FULL), 680);
    chk("short bytes", 4 * event_words(FMT_SHORT), 520);
    chk("dec bytes",   4 * event_words(FMT_DEC), 420);
    chk("debug bytes", 4 * event_words(FMT_DEBUG), 20);

    for (int rep = 0; rep < 200; rep++) begin
      tag = 5'($urandom); cnt = 5'($urandom); bf = 2'($urandom); csr = 16'($urandom);
      r0 = '0; r1 = '0;
      r0[0] = 1; r0[1] = 1;
      for (int i = 0; i < 5; i++) begin r0[2 + i] = tag[i]; r0[7 + i] = cnt[i]; end
      r0[12] = bf[1]; r0[13] = bf[0];
      for (int k = 0; k < 16; k++) r1[15 - k] = csr[k];
      chk("header", header_word(tag, cnt, bf, csr), {r1, r0});

      for (int i = 0; i < $bits(ir); i += 32)  ir[i +: 32]  = $urandom;
      for (int i = 0; i < $bits(orr); i += 32) orr[i +: 32] = $urandom;
      for (int f = 0; f < 12; f++) begin
        r0 = {4'h0, orr.track[f].z0_err, orr.track[f].z0};
        r1 = {orr.track[f].tandip, orr.track[f].curvature};
        chk($sformatf("track %0d", f), out_word(orr, f), {r1, r0});
      end
      chk("decision", out_word(orr, 12), {16'h0, 8'h0, orr.decision});
      for (int h = 0; h < 10; h += 2) begin
        w = '0;
        for (int i = 0; i < 32; i++) if (16*h + i < 153) w[i] = ir.mask[16*h + i];
        chk($sformatf("mask word %0d", h/2), in_word(ir, h/2, 1'b0), w);
      end
      for (int j = 0; j < 12; j += 4) begin
        w = {ir.seed[j+3].phi, ir.seed[j+3].cellloc, ir.seed[j+2].phi, ir.seed[j+2].cellloc,
             ir.seed[j+1].phi, ir.seed[j+1].cellloc, ir.seed[j].phi, ir.seed[j].cellloc};
        chk($sformatf("seed word %0d", j/4), in_word(ir, 5 + j/4, 1'b0), w);
        chk($sformatf("short seed word %0d", j/4), in_word(ir, j/4, 1'b1), w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
