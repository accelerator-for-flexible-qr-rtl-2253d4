// delay_line: DEPTH-stage shift register for any packed type T.
//
// Used to skew operands inside the systolic blocks: an element that must meet
// a rotation produced later (the boundary cell needs three cycles) waits here.
// Output equals the input DEPTH clock cycles earlier. DEPTH must be at least 1.
// The asynchronous active-low reset loads every stage with RESET_VAL.
// A helper of this implementation; the reference design only specifies the
// delays, not how they are built.
module delay_line #(
  parameter type         T         = logic,
  parameter int unsigned DEPTH     = 1,
  parameter T            RESET_VAL = T'(0)
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);

  T stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= RESET_VAL;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

endmodule
