// alu_op: the Arithmetic and Logic Unit of the pixel processor.
//
// Functions (alu_op_e): pass a, a*b, a^2, a<<b, a>>b, a+b, a-b, a&b, a>b, a<b.
// Operand b is iPP_b or the constant from the configuration register and may
// be read as signed (e.g. a signed Laplacian added to the image in edge
// sharpening). For add and subtract b is first shifted left by `kshift`
// (the scale k of s = f + k*e); products and squares are shifted right by
// `oshift`. Results saturate to 0..255; comparisons give 0xFF or 0.
// Latency 2 steps: operation, saturation/output register.
// The function list follows the document; operand selection, scaling and
// saturation are this design's.
module alu_op
  import p2ip_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    px_en,
  input  alu_op_e op,
  input  logic    use_const,
  input  logic    b_signed,
  input  pix_t    cst,
  input  logic [3:0] oshift,
  input  logic [3:0] kshift,
  input  pix_t    a,
  input  pix_t    b_in,
  output pix_t    dout
);
  pix_t b;
  logic signed [31:0] bs, r;
  assign b  = use_const ? cst : b_in;
  assign bs = b_signed ? 32'($signed(b)) : 32'($signed({1'b0, b}));

  always_comb begin
    unique case (op)
      ALU_MUL: r = (32'(a) * 32'(b)) >> oshift;
      ALU_SQR: r = (32'(a) * 32'(a)) >> oshift;
      ALU_SHL: r = 32'(a) << b[3:0];
      ALU_SHR: r = 32'(a) >> b[3:0];
      ALU_ADD: r = 32'(a) + (bs <<< kshift);
      ALU_SUB: r = 32'(a) - (bs <<< kshift);
      ALU_AND: r = 32'(a & b);
      ALU_GT:  r = (a > b) ? 32'd255 : 32'd0;
      ALU_LT:  r = (a < b) ? 32'd255 : 32'd0;
      default: r = 32'(a);
    endcase
  end

  logic signed [31:0] r1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin r1 <= '0; dout <= '0; end
    else if (px_en) begin
      r1   <= r;
      dout <= sat_u8(r1);
    end
  end
endmodule
