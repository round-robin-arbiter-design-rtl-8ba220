// rr_crossbar: (MxV)xN crossbar switch fabric with V = N.
//
// Every virtual output queue VOQ(m,n) (input port m, output port n) has a
// switch to output port n, closed while grant[n][m] is set. The switch
// arbiter of output n sets at most one of grant[n][*], so each output
// carries the head word of the granted queue, or zero with out_valid low.
// The analog transmission gates of a real fabric are modelled here as an
// AND-OR multiplexer of DATA_W-bit words; the word width is this design's
// choice. Purely combinational.
module rr_crossbar #(
  parameter int unsigned M      = 32,  // input ports
  parameter int unsigned N      = 32,  // output ports (= VOQs per input)
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] voq_data [M][N],  // head word of VOQ(m,n)
  input  logic [M-1:0]      grant    [N],     // grant[n][m] = grant(m,n)
  output logic [DATA_W-1:0] out_data [N],
  output logic [N-1:0]      out_valid
);

  always_comb begin
    for (int unsigned n = 0; n < N; n++) begin
      out_data[n]  = '0;
      out_valid[n] = |grant[n];
      for (int unsigned m = 0; m < M; m++)
        out_data[n] = out_data[n] | (voq_data[m][n] & {DATA_W{grant[n][m]}});
    end
  end

endmodule
