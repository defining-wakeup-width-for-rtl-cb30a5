// arbiter_cell: one two-input node of the select tree.
//
// Requests travel towards the root and grants come back down. The cell reports upwards
// whether either of its two inputs requests (any_req). When its parent grants it
// (enable), it passes the grant to input 0 if input 0 requests, otherwise to input 1:
//     grant0 = req0 & enable
//     grant1 = ~req0 & req1 & enable
// so input 0 has the higher priority. The priority is resolved from the requests alone
// ("pre-computed") and only gated by the enable that arrives from the root. Purely
// combinational. The equation is the one the scheduler's select logic is built from; the
// two-input radix of the tree is this design's choice.
module arbiter_cell (
  input  logic req0,
  input  logic req1,
  input  logic enable,
  output logic any_req,
  output logic grant0,
  output logic grant1
);
  assign any_req = req0 | req1;
  assign grant0  = req0 & enable;
  assign grant1  = ~req0 & req1 & enable;
endmodule
