// zpd_pkg -- types, sizes and word packing shared by the ZPD DAQ path.
//
// A ZPD module records one "tick" record per CLK4 into two DAQ memories:
//   * the input record (decoder driver): 153 TSF segment mask bits plus,
//     for each of the 12 seed segments, a 4-bit cell location and the 4
//     leading phi bits (phi[2:5]) -> 153 + 96 = 249 bits;
//   * the output record (decision module): for each of the 12 fitted tracks
//     z0 (8), z0 error (4), curvature (8), tan(dip) (8), plus the 8 decision
//     bits sent to the GLT -> 12*28 + 8 = 344 bits.
// An event is 8 consecutive ticks (T = 0..7, oldest first).
//
// The event data is a stream of 32-bit words built from 16-bit rows. Within a
// row, bit p = 0 is the LSB column of the format table. Fields written
// field[0:n] have their bit i at row bit (offset + i); bf and CSR are "MSB
// first", so bf[1] and CSR[15] sit in the LSB column. Two consecutive rows
// form one 32-bit word with the first row in bits 15:0. These packing rules
// and the word counts per daq_format follow the published format; the bit
// placement inside a row and the row-to-word order are this design's reading
// of the format table.
package zpd_pkg;

  localparam int N_MASK   = 153;              // TSF segments per module
  localparam int N_SEED   = 12;               // seed segments recorded
  localparam int N_TRACK  = 12;               // fitted tracks per tick
  localparam int TICKS    = 8;                // CLK4 ticks per event
  localparam int NUM_BUF  = 4;                // DAQ (event) buffers
  localparam int CIRC_DEPTH = 64;             // circular buffer depth

  typedef struct packed {
    logic [3:0] phi;                          // phi[2:5], leading phi bits
    logic [3:0] cellloc;                      // cell location
  } seed_t;

  typedef struct packed {
    seed_t [N_SEED-1:0]  seed;
    logic  [N_MASK-1:0]  mask;
  } in_rec_t;

  typedef struct packed {
    logic [7:0] tandip;
    logic [7:0] curvature;
    logic [3:0] z0_err;
    logic [7:0] z0;
  } track_t;

  typedef struct packed {
    logic   [7:0]          decision;
    track_t [N_TRACK-1:0]  track;
  } out_rec_t;

  localparam int IN_REC_W  = $bits(in_rec_t);   // 249
  localparam int OUT_REC_W = $bits(out_rec_t);  // 344

  typedef enum logic [1:0] {
    FMT_DEBUG = 2'd0,                         // header + diagnostic test data
    FMT_FULL  = 2'd1,                         // everything (680 bytes)
    FMT_SHORT = 2'd2,                         // no mask bits (520 bytes)
    FMT_DEC   = 2'd3                          // decision module only (420 bytes)
  } daq_format_e;

  // 32-bit words per tick in each section of the event
  localparam int OUT_WORDS_PER_TICK   = 13;   // 24 track rows + decision + pad
  localparam int IN_WORDS_PER_TICK    = 8;    // 10 mask rows + 6 seed rows
  localparam int SEED_WORDS_PER_TICK  = 3;    // the 6 seed rows only
  localparam int DIAG_WORDS           = 4;

  // Event length in 32-bit words, header included.
  function automatic int unsigned event_words(daq_format_e f);
    case (f)
      FMT_DEBUG: return 1 + DIAG_WORDS;
      FMT_FULL:  return 1 + TICKS*OUT_WORDS_PER_TICK + 1 + TICKS*IN_WORDS_PER_TICK;
      FMT_SHORT: return 1 + TICKS*OUT_WORDS_PER_TICK + 1 + TICKS*SEED_WORDS_PER_TICK;
      default:   return 1 + TICKS*OUT_WORDS_PER_TICK;
    endcase
  endfunction

  // Header word: row 0 = {pad, bf[0], bf[1], counter[4:0], tag[4:0], 1, 1},
  // row 1 = CSR bit-reversed (CSR[15] in the LSB column).
  function automatic logic [31:0] header_word(logic [4:0] tag, logic [4:0] counter,
                                              logic [1:0] bf, logic [15:0] csr);
    logic [15:0] r0, r1;
    r0 = {2'b00, bf[0], bf[1], counter, tag, 2'b11};
    r1 = {<<{csr}};
    return {r1, r0};
  endfunction

  // Row h (0..25) of one tick of decision-module data.
  function automatic logic [15:0] out_row(out_rec_t r, int unsigned h);
    track_t t;
    if (h < 2*N_TRACK) begin
      t = r.track[h/2];
      if (h % 2 == 0) return {4'h0, t.z0_err, t.z0};
      else            return {t.tandip, t.curvature};
    end
    if (h == 2*N_TRACK) return {8'h00, r.decision};
    return 16'h0000;                          // alignment padding
  endfunction

  function automatic logic [31:0] out_word(out_rec_t r, int unsigned w);
    return {out_row(r, 2*w+1), out_row(r, 2*w)};
  endfunction

  // Row h (0..15) of one tick of decoder-driver data: rows 0..9 carry the
  // mask (row 9 holds mask[144:152]), rows 10..15 two seeds each.
  function automatic logic [15:0] in_row(in_rec_t r, int unsigned h);
    logic [159:0] m;
    int unsigned  j;
    m = 160'(r.mask);
    if (h < 10) return m[16*h +: 16];
    j = 2*(h - 10);
    return {r.seed[j+1].phi, r.seed[j+1].cellloc, r.seed[j].phi, r.seed[j].cellloc};
  endfunction

  // Word w of one tick of decoder-driver data; in short mode only the seed
  // rows are sent.
  function automatic logic [31:0] in_word(in_rec_t r, int unsigned w, logic seeds_only);
    int unsigned h0;
    h0 = seeds_only ? 10 + 2*w : 2*w;
    return {in_row(r, h0+1), in_row(r, h0)};
  endfunction

endpackage
