// moving_average3: three-point moving sum of an unsigned sample stream.
//
//     out[t] = (in[t] + in[t-1] + in[t-2]) mod 2^BIT_WIDTH
//
// Two registers, z1 and z2, hold the input delayed by one and two cycles; the
// output adds the current input to both, combinationally, and keeps only the
// low BIT_WIDTH bits, so a large sum wraps around.
//
// Interface: in_i is sampled at every rising clk edge; out_o responds to in_i
// in the same cycle.  rst (synchronous, active high) clears z1 and z2.
// The structure and the output width follow the source; the reset is this
// design's choice (the source's registers have no reset value).
module moving_average3 #(
  parameter int unsigned BIT_WIDTH = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [BIT_WIDTH-1:0] in_i,
  output logic [BIT_WIDTH-1:0] out_o
);

  logic [BIT_WIDTH-1:0] z1, z2;

  always_ff @(posedge clk) begin
    if (rst) begin
      z1 <= '0;
      z2 <= '0;
    end else begin
      z1 <= in_i;
      z2 <= z1;
    end
  end

  assign out_o = in_i + z1 + z2;  // wraps at BIT_WIDTH bits

endmodule
