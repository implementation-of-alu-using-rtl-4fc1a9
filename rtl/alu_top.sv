// Generic ALU built around the radix-4 modified Booth multiplier.
//
// Four units work on the operands a and b in parallel: a ripple-carry adder
// giving the 9-bit sum, the signed 8 x 8 modified Booth multiplier (the
// extension variant: SPST adder with Ladner-Fischer adders) giving the
// 16-bit product, and bitwise AND and OR, zero-extended to 16 bits. The
// 2-bit operation code selects one of them into the 16-bit result register
// alu_out:
//   00  a + b (unsigned, 9 bits)   01  a * b (signed, 16 bits)
//   10  a & b                      11  a | b
// A programmable clock divider sets the ALU's rate: the result register and
// the multiplier pipeline only advance on the divider's tick, once every
// div_ratio clk cycles, when clk_out rises.
//
// Timing, counted in ticks: for add, AND and OR alu_out shows the result one
// tick after the operands and code are applied; for multiply the product
// needs two ticks through the multiplier pipeline, so alu_out is valid from
// the third tick. rst is synchronous and active high and clears the result
// register, the multiplier pipeline and the divider.
//
// The units, the ports a, b, clk, rst, operation, alu_out, the codes 00 (add)
// and 01 (multiply), the 9-bit sum and the registered result follow the
// source. The codes for AND and OR, the div_ratio port, clocking the result
// register with the divider's tick as an enable instead of with clk_out
// itself, and tying the divider's enable high are this design's choices.
// sum and product are brought out for observation.
module alu_top
  import mbe_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          operation,
  input  logic [DIV_W-1:0] div_ratio,
  output logic [2*WIDTH-1:0] alu_out,
  output logic             clk_out,
  output logic [WIDTH:0]   sum,
  output logic [2*WIDTH-1:0] product
);
  logic tick;

  clk_divider #(.DIV_W(DIV_W)) u_div (
    .clk      (clk),
    .rst      (rst),
    .enable   (1'b1),
    .div_ratio(div_ratio),
    .clk_out  (clk_out),
    .tick     (tick)
  );

  rca_adder #(.W(WIDTH)) u_add (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (sum[WIDTH-1:0]),
    .cout(sum[WIDTH])
  );

  mbe_multiplier #(.N(WIDTH), .KIND(LADNER_FISCHER)) u_mul (
    .clk    (clk),
    .reset  (rst),
    .en     (tick),
    .x      (a),
    .w      (b),
    .product(product)
  );

  logic [2*WIDTH-1:0] result;

  always_comb begin
    unique case (operation)
      OP_ADD:  result = (2*WIDTH)'(sum);
      OP_MUL:  result = product;
      OP_AND:  result = (2*WIDTH)'(a & b);
      OP_OR:   result = (2*WIDTH)'(a | b);
      default: result = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       alu_out <= '0;
    else if (tick) alu_out <= result;
  end
endmodule
