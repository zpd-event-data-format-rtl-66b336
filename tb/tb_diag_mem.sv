// tb_diag_mem -- self-checking test of the debug-mode test-data memory.
//
// Writes random bytes to random addresses, some outside 0x4000..0x400F (they
// must be ignored), and checks the four assembled words against a byte-array
// reference after every write.
module tb_diag_mem;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [15:0] addr = '0;
  logic [7:0]  wdata = '0;
  logic [3:0][31:0] words;

  int checks = 0, failures = 0;
  logic [7:0] ref_bytes [16];

  diag_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_bytes[i]) ref_bytes[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0:       addr = 16'($urandom);                 // mostly out of range
        1:       addr = 16'h4010 + 16'($urandom_range(0, 15));
        default: addr = 16'h4000 + 16'($urandom_range(0, 15));
      endcase
      wdata = 8'($urandom);
      we    = 1;
      if (addr >= 16'h4000 && addr <= 16'h400F) ref_bytes[addr[3:0]] = wdata;
      @(negedge clk);
      we = 0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (words[k] !== {ref_bytes[4*k+3], ref_bytes[4*k+2], ref_bytes[4*k+1], ref_bytes[4*k]}) begin
          failures++; $display("word %0d: got %h", k, words[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
