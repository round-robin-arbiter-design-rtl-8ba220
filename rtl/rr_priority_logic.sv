// rr_priority_logic: fixed-priority selector with an enable.
//
// out_gnt[j] is set when en is high, in_req[j] is high and no input of a
// lower index is high:
//   out_gnt[0] = en & in_req[0]
//   out_gnt[j] = en & ~in_req[0] & ... & ~in_req[j-1] & in_req[j]
// so in_req[0] has the highest priority. The output is one-hot, or all zero
// when en is low or nothing is requested. Purely combinational.
// The equations are the ones given for the 4-input block; N generalises them
// to any width (the bus arbiters here use N = 2 and N = 4).
module rr_priority_logic #(
  parameter int unsigned N = 4
) (
  input  logic         en,
  input  logic [N-1:0] in_req,
  output logic [N-1:0] out_gnt
);

  always_comb begin
    logic blocked;  // some input of a lower index is high
    blocked = 1'b0;
    for (int unsigned j = 0; j < N; j++) begin
      out_gnt[j] = en & in_req[j] & ~blocked;
      blocked    = blocked | in_req[j];
    end
  end

endmodule
