// One stage of the filter's delay lines: an N-input multiplexer in front of
// a W-bit register.
//
// On every rising clock edge the register loads the input chosen by sel.
// The register's own output is wired back to one of the inputs by the
// instantiating module, so that one select code means "hold"; the others
// shift the line or load a new sample. A select value of N or above also
// holds. The register clears to 0 on the active-low asynchronous reset
// (reset behaviour is this design's own choice).
//
// Interface: d[N] candidate inputs, sel select, q register output.
// Timing: q changes one cycle after sel/d.
module delay_stage #(
  parameter int unsigned W  = 4,   // sample width
  parameter int unsigned N  = 2,   // number of multiplexer inputs
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] d [N],
  input  logic [SW-1:0]       sel,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q <= '0;
    else if (32'(sel) < N)   q <= d[sel];
  end

endmodule
