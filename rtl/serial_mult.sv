// serial_mult: signed shift-and-add multiplier, one product per 2*WIDTH+3
// clocks (21 clocks for the 9-bit operands of the filter).
//
// How it works. A free-running operation counter `count` runs 0 .. 2*WIDTH+2
// and restarts; `mult_start` is high during count 0 and `mult_done` during
// the last count. At count 0 the operand sign bits are stored (np, nc). At
// count 1 both operands are loaded as magnitudes: the multiplier into
// `mplierbus`, the multiplicand into the low half of the 2*WIDTH-bit product
// register `mag`, whose high half is cleared. On every even count the LSB of
// the product register decides whether the multiplier is added into the high
// half (through a sign_ext_adder); on every odd count the register shifts
// right by one. After WIDTH add/shift pairs the register holds the unsigned
// product of the magnitudes. While `mult_done` is high, `mag` and `neg`
// (np ^ nc) are valid and `result` is loaded with the signed product, which
// then holds until the next `mult_done`.
//
// Interface and timing. `mplier` and `mcand` must be stable during counts 0
// and 1 of a multiplication. `res` low clears the counter and registers
// (synchronously) and arms a start, so the first multiplication begins on the
// first clock after `res` rises.
//
// From the published design: the counter-driven load/add/shift controller,
// the sign handling by magnitudes, the 21-clock cycle. Own choices: keeping
// the adder's WIDTH-bit sum only (safe: the high half always stays below the
// multiplier magnitude, so the sum never reaches 2**WIDTH), the reset values,
// and arming a start during reset, and the two cycle assertions at the end.
module serial_mult #(
  parameter  int WIDTH = 9,
  localparam int LAST  = 2 * WIDTH + 2,
  localparam int CNT_W = $clog2(LAST + 1)
) (
  input  logic                 clk,
  input  logic                 res,
  input  logic [WIDTH-1:0]     mplier,
  input  logic [WIDTH-1:0]     mcand,
  output logic [CNT_W-1:0]     count,
  output logic                 mult_start,
  output logic                 mult_done,
  output logic                 neg,
  output logic [2*WIDTH-1:0]   mag,
  output logic [2*WIDTH-2:0]   result
);
  localparam logic [CNT_W-1:0] DONE_AT = CNT_W'(LAST - 1);
  localparam logic [CNT_W-1:0] LOAD_AT = CNT_W'(1);

  logic             np, nc;
  logic [WIDTH-1:0] mplierbus;
  logic [WIDTH:0]   sum;
  logic             load, add, shift;
  logic [WIDTH-1:0] mplier_abs, mcand_abs;

  // Controller: load at count 1, add on even counts when the product LSB is
  // set, shift on odd counts.
  always_comb begin
    load  = (count == LOAD_AT);
    add   = !load && !count[0] && mag[0];
    shift = !load && count[0];
  end

  always_comb begin
    mplier_abs = np ? (~mplier + WIDTH'(1)) : mplier;
    mcand_abs  = nc ? (~mcand  + WIDTH'(1)) : mcand;
    neg        = np ^ nc;
  end

  sign_ext_adder #(.WIDTH(WIDTH)) u_add (
    .a     (mplierbus),
    .b     (mag[2*WIDTH-1:WIDTH]),
    .result(sum)
  );

  always_ff @(posedge clk) begin
    if (!res) begin
      count      <= '0;
      mult_done  <= 1'b0;
      mult_start <= 1'b1;
      np         <= 1'b0;
      nc         <= 1'b0;
      mplierbus  <= '0;
      mag        <= '0;
      result     <= '0;
    end else begin
      count      <= mult_done ? '0 : count + CNT_W'(1);
      mult_done  <= (count == DONE_AT);
      mult_start <= mult_done;
      if (mult_start) begin
        np <= mplier[WIDTH-1];
        nc <= mcand[WIDTH-1];
      end
      if (load) begin
        mplierbus <= mplier_abs;
        mag       <= {{WIDTH{1'b0}}, mcand_abs};
      end else if (add) begin
        mag[2*WIDTH-1:WIDTH] <= sum[WIDTH-1:0];
      end else if (shift) begin
        mag <= {1'b0, mag[2*WIDTH-1:1]};
      end
      if (mult_done)
        result <= neg ? (~mag[2*WIDTH-2:0] + (2*WIDTH-1)'(1)) : mag[2*WIDTH-2:0];
    end
  end

  logic unused_sum_msb;
  assign unused_sum_msb = sum[WIDTH];

  // Cycle rule of the controller: a product is reported only at the last
  // count, and the next multiplication starts right after it.
  a_done_at_last: assert property (@(posedge clk) disable iff (!res)
                                   mult_done |-> count == CNT_W'(LAST));
  a_start_follows_done: assert property (@(posedge clk) disable iff (!res)
                                         mult_done |=> mult_start && count == '0);
endmodule
