// align_mux: array of N N-to-1 multiplexers that aligns N data ports.
//
// Output k carries input sel[k]. In the charge-mapping pipeline one array routes
// the results of the 64 arithmetic units to the write ports of the 64 RAM banks
// and a second array routes the 64 bank read ports back to the arithmetic units
// (and to the grid read-out port), because which unit's support point lives in
// which bank depends on the particle's integer coordinates. Purely combinational.
module align_mux #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 32,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic [W-1:0]  din  [N],
  input  logic [SW-1:0] sel  [N],
  output logic [W-1:0]  dout [N]
);

  always_comb begin
    for (int k = 0; k < N; k++) dout[k] = din[sel[k]];
  end

endmodule
