// Two delayable tasks under a mutual-exclusion controller.
//
// Composes two delayable automata and drives their controllable inputs c1,
// c2 so that the two tasks are never active at the same time, the contract
// "enforce not (a1 and a2) with c1, c2" under the assumption that r1 and r2
// are never requested together. The composition and the contract follow the
// exclusion example; the control logic itself is this design's own
// maximally permissive solution of that contract, with priority to task 1:
//   c1 = not (task 2 active and not ending in this reaction)
//   c2 = not (task 1 active and not ending) and not s1 (task 1 not being
//        started in this reaction).
// An assertion checks the enforced property every cycle.
//
// Timing: as delayable; c1/c2 are combinational from the current state.
module twotasks (
  input  logic clk,
  input  logic rst_n,
  input  logic r1, e1,
  input  logic r2, e2,
  output logic a1, s1,
  output logic a2, s2
);
  logic c1, c2;

  delayable u_t1 (.clk, .rst_n, .r(r1), .c(c1), .e(e1), .a(a1), .s(s1));
  delayable u_t2 (.clk, .rst_n, .r(r2), .c(c2), .e(e2), .a(a2), .s(s2));

  // Controller: a task may start only if the other one will not be active in
  // the next reaction.
  always_comb begin
    c1 = ~(a2 & ~e2);
    c2 = ~(a1 & ~e1) & ~s1;
  end

  property p_excl;
    @(posedge clk) disable iff (!rst_n) !(a1 && a2);
  endproperty
  a_excl: assert property (p_excl) else $error("both tasks active");
endmodule
