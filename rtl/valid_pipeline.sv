// Valid pipeline of the FFT wrappers.
//
// The FFT is a free-running pipeline with a fixed latency, so its output is
// marked valid by carrying the input valid through a shift register as long
// as that latency: valid_reg[0] takes valid_in on each rising clock edge,
// every further bit takes the one below it, and valid_out is bit LAT-1.
// valid_out is therefore valid_in delayed by exactly LAT clock cycles.
// Reset is active low and asynchronous and clears the register, as in the
// design this follows; LAT defaults to 13, the latency of the 16-point FFT.
module valid_pipeline #(
  parameter int unsigned LAT = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_in,
  output logic valid_out
);

  logic [LAT-1:0] valid_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_reg <= '0;
    else if (LAT > 1) valid_reg <= {valid_reg[LAT-2:0], valid_in};
    else valid_reg[0] <= valid_in;
  end

  assign valid_out = valid_reg[LAT-1];

endmodule
