// output_reg: output register feeding the D/A converter.
//
// The D/A converter expects "complementary two's complement" codes: the
// largest positive value is all zeros, zero is 0111..1, -1 is 1000..0 and the
// most negative value all ones. That is the two's complement word with every
// bit except the MSB inverted. On a clock with `update` high the register
// stores {sum[MSB], ~sum[MSB-1:0]}; otherwise it holds, so the converter sees
// one stable word per sampling period. The filter raises `update` at the
// start of slot 0, when all products of the previous period are summed.
//
// The coding and the update point are the published design; the reset value
// (the code of zero, on `res` low, synchronous) is this design's choice.
module output_reg #(
  parameter int OUT_W = 16
) (
  input  logic             clk,
  input  logic             res,
  input  logic             update,
  input  logic [OUT_W-1:0] sum,
  output logic [OUT_W-1:0] outdata
);
  always_ff @(posedge clk) begin
    if (!res)
      outdata <= {1'b0, {(OUT_W-1){1'b1}}};
    else if (update)
      outdata <= {sum[OUT_W-1], ~sum[OUT_W-2:0]};
  end
endmodule
