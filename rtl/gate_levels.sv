// gate_levels: the smallest example of what sets the clock rate, a path of
// three gate levels between two registers, and the same path split by a
// register.
//
// Register A drives an AND gate, whose output drives an OR gate, whose
// output drives a second AND gate into register B: three levels of gates in
// series between two registers. With SPLIT=1 (default) register C is placed
// after the OR gate, so the longest path between registers shrinks to two
// levels (A -> AND -> OR -> C) and one level (C -> AND -> B). The gate
// types, the register names and the position of register C are the
// lecture's. The second input of each gate (p, q, r) is not drawn with a
// source; here each is a module input used directly, and the first-level
// operand a is loaded into register A every cycle.
//
// Timing: SPLIT=0: b after edge k+1 = ((a_k & p) | q) & r, with a_k the
// value of a at edge k and p, q, r their values just before edge k+1.
// SPLIT=1: c after edge k+1 = (a_k & p) | q; b after edge k+2 =
// c & r, each side input sampled at the edge that captures its gate.
module gate_levels #(
  parameter bit SPLIT = 1'b1
) (
  input  logic clk,
  input  logic a,
  input  logic p,
  input  logic q,
  input  logic r,
  output logic b
);

  logic reg_a, reg_b, w_and1, w_or;

  always_ff @(posedge clk) reg_a <= a;

  assign w_and1 = reg_a & p;
  assign w_or   = w_and1 | q;

  if (SPLIT) begin : g_split
    logic reg_c;
    always_ff @(posedge clk) begin
      reg_c <= w_or;
      reg_b <= reg_c & r;
    end
  end else begin : g_direct
    always_ff @(posedge clk) reg_b <= w_or & r;
  end

  assign b = reg_b;

endmodule
