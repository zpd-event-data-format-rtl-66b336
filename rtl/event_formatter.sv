// event_formatter -- reads a frozen DAQ buffer pair out as one ZPD event.
//
// On start it takes the buffer number, trigger tag and trigger time counter
// from the controller and the CSR (daq_format = csr[1:0]) and emits a stream
// of 32-bit words with a valid/ready handshake:
//   header                        1 word  (tag, counter, bf, CSR)
//   decision-module data       8 x 13 words (12 tracks + decision per tick)
//   gap                           1 word  (value 0; the document leaves it undefined)
//   decoder-driver data        8 x 8 words (mask + seeds)  - daq_format 1
//                              8 x 3 words (seeds only)    - daq_format 2
// daq_format 3 stops after the decision-module data, daq_format 0 sends the
// header and the four diagnostic words instead. Totals: 680, 520, 420 and 20
// bytes per event, as the document gives them.
//
// The tick record is fetched from the DAQ memories through a synchronous
// read port (rd_en -> data one clock later), one fetch per tick, so each
// tick costs one idle cycle before its words. dout_last marks the final
// word; rd_done pulses after it has been accepted. A word is held stable
// while dout_valid is high and dout_ready low.
module event_formatter
  import zpd_pkg::*;
#(
  parameter int unsigned N_BUF = 4,
  localparam int unsigned BW = $clog2(N_BUF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [BW-1:0]    buf_sel,
  input  logic [4:0]       tag,
  input  logic [4:0]       counter,
  input  logic [15:0]      csr,
  input  logic [3:0][31:0] diag_words,
  // read port shared by both DAQ memories
  output logic             rd_en,
  output logic [BW-1:0]    rd_buf,
  output logic [2:0]       rd_tick,
  input  out_rec_t         out_rec,
  input  in_rec_t          in_rec,
  // event word stream
  output logic [31:0]      dout,
  output logic             dout_valid,
  output logic             dout_last,
  input  logic             dout_ready,
  output logic             rd_done,
  output logic             busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_HDR, S_OLOAD, S_OEMIT, S_GAP, S_ILOAD, S_IEMIT, S_DBG, S_DONE
  } state_e;

  state_e      state;
  daq_format_e fmt;
  logic [4:0]  tag_q, counter_q;
  logic [15:0] csr_q;
  logic [BW-1:0] buf_q;
  logic [2:0]  t;                              // tick 0..7
  logic [3:0]  w;                              // word within the tick
  logic [3:0]  in_last_w;
  logic        fire;

  assign in_last_w = (fmt == FMT_SHORT) ? 4'(SEED_WORDS_PER_TICK - 1)
                                        : 4'(IN_WORDS_PER_TICK - 1);
  assign fire = dout_valid && dout_ready;

  assign rd_en   = (state == S_OLOAD) || (state == S_ILOAD);
  assign rd_buf  = buf_q;
  assign rd_tick = t;
  assign busy    = (state != S_IDLE);
  assign rd_done = (state == S_DONE);

  always_comb begin
    dout       = '0;
    dout_valid = 1'b0;
    dout_last  = 1'b0;
    unique case (state)
      S_HDR: begin
        dout       = header_word(tag_q, counter_q, buf_q, csr_q);
        dout_valid = 1'b1;
      end
      S_OEMIT: begin
        dout       = out_word(out_rec, 32'(w));
        dout_valid = 1'b1;
        dout_last  = (fmt == FMT_DEC) && (t == 3'(TICKS - 1)) &&
                     (w == 4'(OUT_WORDS_PER_TICK - 1));
      end
      S_GAP: begin
        dout       = '0;
        dout_valid = 1'b1;
      end
      S_IEMIT: begin
        dout       = in_word(in_rec, 32'(w), fmt == FMT_SHORT);
        dout_valid = 1'b1;
        dout_last  = (t == 3'(TICKS - 1)) && (w == in_last_w);
      end
      S_DBG: begin
        dout       = diag_words[w[1:0]];
        dout_valid = 1'b1;
        dout_last  = (w == 4'(DIAG_WORDS - 1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      fmt       <= FMT_FULL;
      tag_q     <= '0;
      counter_q <= '0;
      csr_q     <= '0;
      buf_q     <= '0;
      t         <= '0;
      w         <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          fmt       <= daq_format_e'(csr[1:0]);
          tag_q     <= tag;
          counter_q <= counter;
          csr_q     <= csr;
          buf_q     <= buf_sel;
          t         <= '0;
          w         <= '0;
          state     <= S_HDR;
        end
        S_HDR: if (fire) state <= (fmt == FMT_DEBUG) ? S_DBG : S_OLOAD;
        S_OLOAD: state <= S_OEMIT;
        S_OEMIT: if (fire) begin
          if (w == 4'(OUT_WORDS_PER_TICK - 1)) begin
            w <= '0;
            if (t == 3'(TICKS - 1)) begin
              t     <= '0;
              state <= (fmt == FMT_DEC) ? S_DONE : S_GAP;
            end else begin
              t     <= t + 1'b1;
              state <= S_OLOAD;
            end
          end else begin
            w <= w + 1'b1;
          end
        end
        S_GAP: if (fire) state <= S_ILOAD;
        S_ILOAD: state <= S_IEMIT;
        S_IEMIT: if (fire) begin
          if (w == in_last_w) begin
            w <= '0;
            if (t == 3'(TICKS - 1)) begin
              t     <= '0;
              state <= S_DONE;
            end else begin
              t     <= t + 1'b1;
              state <= S_ILOAD;
            end
          end else begin
            w <= w + 1'b1;
          end
        end
        S_DBG: if (fire) begin
          if (w == 4'(DIAG_WORDS - 1)) begin
            w     <= '0;
            state <= S_DONE;
          end else begin
            w <= w + 1'b1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A presented word may not change until it is accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           dout_valid && !dout_ready |=> dout_valid && $stable(dout));

endmodule
