// segment_queue: the input module of the datapath (the thesis's queue).
//
// Holds the 48-bit target word and presents it two characters (16 bits) at
// a time, first characters first: segment i is word[47-16i -: 16]. While
// control is 0 the word register follows the word input and the segment
// index I is held at 0. While control is 1 the word is held, segment I is
// presented on seg, and incr_i advances I by one on the rising clock edge.
//
// word_done is 1 once I has passed the last segment, or when the current
// segment is two NUL characters; the latter lets a word of fewer than six
// letters be padded with zeros. seg is 0 while word_done is 1. The segment
// size, control and incr_I are the thesis's; the capture rule, the padding
// rule and word_done are this design's choices.
module segment_queue
  import tts_pkg::*;
(
  input  logic   clk,
  input  logic   rst,        // synchronous, active high
  input  logic   control,    // 0: take a new word, 1: present segments
  input  logic   incr_i,     // advance to the next segment
  input  word_t  word,
  output phone_t seg,        // current segment X
  output logic   word_done   // no segment left to search
);
  localparam int unsigned IDX_W = $clog2(NUM_SEG + 1);

  word_t            word_q;
  logic [IDX_W-1:0] idx;
  phone_t           cur;
  logic             past_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      word_q <= '0;
      idx    <= '0;
    end else if (!control) begin
      word_q <= word;
      idx    <= '0;
    end else if (incr_i && !past_end) begin
      idx <= idx + 1'b1;
    end
  end

  assign past_end  = (idx >= IDX_W'(NUM_SEG));
  // Segment I of the held word; nothing once I has passed the last one.
  always_comb begin
    cur = '0;
    for (int unsigned i = 0; i < NUM_SEG; i++)
      if (idx == IDX_W'(i)) cur = word_q[WORD_W-1 - SEG_W*i -: SEG_W];
  end
  assign word_done = past_end || (cur == '0);
  assign seg       = word_done ? '0 : cur;
endmodule
