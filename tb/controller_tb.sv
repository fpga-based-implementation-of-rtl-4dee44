// controller_tb: checks the controller against the sum-of-products
// next-state and output equations of its state table, evaluated here on
// the state bits A, B, C. Inputs are random for several thousand cycles,
// biased so that every state and every transition is taken; the testbench
// counts the transitions seen and fails if one of the thirteen never occurs.
module controller_tb;
  import tts_pkg::*;
  logic clk = 0, reset, ready, load, kvalue, cmp, player_done;
  logic reset_k, incr_k, incr_i, found, dfound;
  state_t state;
  int checks = 0, failures = 0;
  int seen [8][8];

  controller dut (.clk, .reset, .ready, .load, .kvalue, .cmp, .player_done,
                  .reset_k, .incr_k, .incr_i, .found, .dfound, .state);

  always #5 clk = ~clk;

  logic A, B, C;
  logic s[8];
  logic eA, eB, eC, e_rk, e_ii, e_ik, e_f, e_df;
  always_comb begin
    {A, B, C} = state;
    for (int i = 0; i < 8; i++) s[i] = ({A, B, C} == 3'(i));
    eA   = (s[3] & ~kvalue) | s[4] | s[6];
    eB   = (s[1] & load) | s[2] | (s[3] & kvalue) | (s[4] & cmp) | s[5] | s[6] | s[7];
    eC   = (s[0] & ready) | (s[1] & ~load) | s[2] | (s[4] & ~cmp) | s[5] | (s[6] & player_done);
    e_rk = (s[0] & ready) | (s[3] & kvalue) | s[7];
    e_ii = (s[3] & kvalue) | s[7];
    e_ik = s[5];
    e_f  = s[4] & cmp;
    e_df = s[3] & kvalue;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_next, prev;
    reset = 1; ready = 0; load = 0; kvalue = 0; cmp = 0; player_done = 0;
    @(posedge clk); #1;
    reset = 0;
    checks++;
    if (state !== S0_IDLE) begin failures++; $display("FAIL reset state"); end
    for (int n = 0; n < 6000; n++) begin
      ready       = ($urandom % 3) == 0;
      load        = ($urandom % 3) == 0;
      kvalue      = ($urandom % 3) == 0;
      cmp         = ($urandom % 3) == 0;
      player_done = ($urandom % 3) == 0;
      reset       = ($urandom % 400) == 0;
      #1;
      checks++;
      if ({reset_k, incr_i, incr_k, found, dfound} !== {e_rk, e_ii, e_ik, e_f, e_df}) begin
        failures++;
        $display("FAIL outputs state=%0d got=%b exp=%b", state,
                 {reset_k, incr_i, incr_k, found, dfound}, {e_rk, e_ii, e_ik, e_f, e_df});
      end
      exp_next = reset ? 3'b000 : {eA, eB, eC};
      prev = state;
      @(posedge clk); #1;
      checks++;
      if (state !== exp_next) begin
        failures++;
        $display("FAIL next state from %0d got=%0d exp=%0d", prev, state, exp_next);
      end
      if (!reset) seen[prev][state]++;
    end
    // the thirteen rows of the state table
    begin
      int rows [13][2] = '{'{0,0},'{0,1},'{1,1},'{1,2},'{2,3},'{3,4},'{3,2},
                           '{4,5},'{4,6},'{5,3},'{6,6},'{6,7},'{7,2}};
      for (int r = 0; r < 13; r++) begin
        checks++;
        if (seen[rows[r][0]][rows[r][1]] == 0) begin
          failures++;
          $display("FAIL transition S%0d->S%0d never taken", rows[r][0], rows[r][1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
