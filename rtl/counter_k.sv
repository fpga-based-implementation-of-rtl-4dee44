// counter_k: register counter K, the scan address into the phone library.
//
// reset_K clears it and incr_K adds one, both on the rising clock edge;
// reset_K wins if both are high. The counter is one bit wider than the
// library address so that it can reach DEPTH, the value one past the last
// entry: kvalue is 1 exactly then and tells the controller that every entry
// has been compared. Incrementing stops at DEPTH.
//
// The reset and increment controls and kvalue are the thesis's. The extra
// counter bit, the saturation and the master reset rst are this design's
// choices.
module counter_k #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,      // synchronous, active high
  input  logic              reset_k,
  input  logic              incr_k,
  output logic [ADDR_W-1:0] addr,     // library address K
  output logic              kvalue    // K has passed the last entry
);
  logic [ADDR_W:0] k;

  always_ff @(posedge clk) begin
    if (rst || reset_k)
      k <= '0;
    else if (incr_k && !k[ADDR_W])
      k <= k + 1'b1;
  end

  assign addr   = k[ADDR_W-1:0];
  assign kvalue = k[ADDR_W];  // k == DEPTH
endmodule
