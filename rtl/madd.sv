// madd: multiply-add circuit y = 3*b + c, the lecture's example of
// pipelining a datapath.
//
// b (16 bits) and c (32 bits) are captured in input registers r_b and r_c;
// r_b is multiplied by the 16-bit constant 3 into a 32-bit product, the
// product is added to r_c and the 32-bit sum is captured in output register
// r_y, which drives y. The sum is kept modulo 2^32.
//
// STAGES selects the organisation, both from the lecture:
//   1  the original circuit: multiplier and adder between the input and
//      output registers (critical path r_b -> multiplier -> adder -> r_y);
//      y shows the result of inputs given two clock edges earlier.
//   2  the two-stage pipelined circuit (default): pipeline registers r_d
//      (product) and r_e (r_c delayed by one cycle) split the path into
//      stage 1 (multiplier) and stage 2 (adder); y shows the result of
//      inputs given three clock edges earlier.
// Both accept a new pair (b, c) every cycle. There is no reset: the
// registers carry data only, and y is meaningful once the pipeline has been
// fed for 2 (or 3) cycles.
module madd #(
  parameter int unsigned STAGES = 2
) (
  input  logic        clk,
  input  logic [15:0] b,
  input  logic [31:0] c,
  output logic [31:0] y
);

  localparam logic [15:0] K = 16'd3;

  logic [15:0] r_b;
  logic [31:0] r_c, r_y, w_mul, w_sum;

  always_ff @(posedge clk) begin
    r_b <= b;
    r_c <= c;
  end

  assign w_mul = 32'(r_b) * 32'(K);

  if (STAGES == 1) begin : g_single
    assign w_sum = w_mul + r_c;
  end else begin : g_pipe
    logic [31:0] r_d, r_e;
    always_ff @(posedge clk) begin
      r_d <= w_mul;
      r_e <= r_c;
    end
    assign w_sum = r_d + r_e;
  end

  always_ff @(posedge clk) r_y <= w_sum;

  assign y = r_y;

  initial assert (STAGES == 1 || STAGES == 2)
    else $error("madd: STAGES must be 1 or 2");

endmodule
