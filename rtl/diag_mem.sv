// diag_mem -- diagnostic test-data memory returned in debug mode.
//
// Sixteen bytes at byte addresses 0x4000..0x400F (the low 4 address bits
// select the byte). In debug mode (daq_format = 0) the event carries four
// 32-bit words, word k made of bytes 0x4000+4k .. 0x4000+4k+3 with the lowest
// address in bits 7:0. The host fills the bytes through the write port.
//
// The address range and the 20-byte debug event follow the document; the
// byte-wide write port and the byte order inside a word are this design's
// choice. Writes take effect at the clock edge; words is read combinationally.
module diag_mem #(
  parameter int unsigned BASE_ADDR = 32'h4000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [15:0] addr,          // byte address, 0x4000..0x400F accepted
  input  logic [7:0]  wdata,
  output logic [3:0][31:0] words     // words[k] = bytes 4k+3..4k
);

  logic [7:0] bytes_q [16];
  logic       hit;

  assign hit = (addr[15:4] == BASE_ADDR[15:4]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) bytes_q[i] <= '0;
    end else if (we && hit) begin
      bytes_q[addr[3:0]] <= wdata;
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++)
      words[k] = {bytes_q[4*k+3], bytes_q[4*k+2], bytes_q[4*k+1], bytes_q[4*k]};
  end

endmodule
