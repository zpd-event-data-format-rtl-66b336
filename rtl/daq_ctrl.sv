// daq_ctrl -- fast-control sequencing of the four DAQ buffers.
//
// On L1Accept one free DAQ buffer is frozen and the trigger tag and trigger
// time counter are stored with it. On READ_EVENT the oldest frozen buffer is
// handed to the event formatter (start_rd with its number, tag and counter);
// when the formatter reports readout done (rd_done) that buffer is released
// and fills again. Buffers are frozen and read in round-robin order, so
// events leave in the order they were accepted.
//
// Error cases (the document does not describe them; this design's choice):
// an L1Accept with all buffers frozen is dropped and pulses `overflow`; a
// READ_EVENT with nothing frozen or while a readout is running is dropped and
// pulses `read_error`.
//
// Timing: all outputs are registered; freeze / start_rd / release_buf are
// one-cycle pulses one clock after the causing input.
module daq_ctrl #(
  parameter int unsigned NUM_BUF = 4,
  localparam int unsigned BW = $clog2(NUM_BUF),
  localparam int unsigned CW = $clog2(NUM_BUF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          l1_accept,
  input  logic [4:0]    trig_tag,
  input  logic [4:0]    trig_counter,
  input  logic          read_event,
  input  logic          rd_done,        // formatter finished the current event
  output logic          freeze,
  output logic [BW-1:0] freeze_sel,
  output logic          release_buf,
  output logic [BW-1:0] release_sel,
  output logic          start_rd,
  output logic [BW-1:0] rd_sel,
  output logic [4:0]    rd_tag,
  output logic [4:0]    rd_counter,
  output logic [CW-1:0] n_frozen,
  output logic          reading,
  output logic          overflow,
  output logic          read_error
);

  logic [BW-1:0] wr_ptr, rd_ptr;
  logic [4:0]    tag_q [NUM_BUF];
  logic [4:0]    cnt_q [NUM_BUF];
  logic          accept, start, done;

  assign accept = l1_accept && (n_frozen < CW'(NUM_BUF));
  assign start  = read_event && !reading && (n_frozen != '0);
  assign done   = rd_done && reading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '0;
      rd_ptr      <= '0;
      n_frozen    <= '0;
      reading     <= 1'b0;
      freeze      <= 1'b0;
      freeze_sel  <= '0;
      release_buf <= 1'b0;
      release_sel <= '0;
      start_rd    <= 1'b0;
      rd_sel      <= '0;
      rd_tag      <= '0;
      rd_counter  <= '0;
      overflow    <= 1'b0;
      read_error  <= 1'b0;
      for (int b = 0; b < NUM_BUF; b++) begin
        tag_q[b] <= '0;
        cnt_q[b] <= '0;
      end
    end else begin
      freeze      <= accept;
      release_buf <= done;
      start_rd    <= start;
      overflow    <= l1_accept && !accept;
      read_error  <= read_event && !start;

      if (accept) begin
        freeze_sel    <= wr_ptr;
        tag_q[wr_ptr] <= trig_tag;
        cnt_q[wr_ptr] <= trig_counter;
        wr_ptr        <= BW'(wr_ptr + 1'b1);
      end
      if (start) begin
        rd_sel     <= rd_ptr;
        rd_tag     <= tag_q[rd_ptr];
        rd_counter <= cnt_q[rd_ptr];
        reading    <= 1'b1;
      end
      if (done) begin
        release_sel <= rd_ptr;
        rd_ptr      <= BW'(rd_ptr + 1'b1);
        reading     <= 1'b0;
      end
      n_frozen <= n_frozen + CW'(accept) - CW'(done);
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  n_frozen <= CW'(NUM_BUF));
  a_read_needs_frozen: assert property (@(posedge clk) disable iff (!rst_n)
                                        reading |-> n_frozen != '0);

endmodule
