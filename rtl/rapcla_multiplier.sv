// rapcla_multiplier: N x N unsigned array multiplier whose partial-product
// rows are accumulated by RAP-CLA adders.
//
// Row 0 is A & B[0]. Each further row i adds A & B[i] to the upper N bits of
// the running sum with an N-bit rapcla_adder; the adder's low sum bit is
// product bit i and its carry-out becomes the top bit of the next running
// sum. After N-1 rows the running sum is the upper half of the product.
// All row adders share the mode input, so in exact mode the result is
// A * B and in approximate mode every row addition uses the windowed
// carries, giving an approximate product.
// The multiplier structure is this design's choice; what follows the
// source is the 32-bit product of the two 16-bit operands on ALU output P3
// and the use of the reconfigurable adder for the additions.
//
// Interface: a, b (N bits), approx in; prod (2N bits) out. Purely
// combinational.
module rapcla_multiplier #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 4,
  parameter int unsigned APX_BITS = N   // reconfigurable low-order carries
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           approx,
  output logic [2*N-1:0] prod
);

  // run[i] is the running upper part entering row i.
  logic [N-1:0] run  [N];
  logic [N-1:0] rsum [N];
  logic         rco  [N];

  assign run[0]  = {1'b0, a[N-1:1] & {(N-1){b[0]}}};
  assign prod[0] = a[0] & b[0];
  assign rsum[0] = '0;
  assign rco[0]  = 1'b0;

  for (genvar i = 1; i < N; i++) begin : g_row
    rapcla_adder #(.N(N), .W(W), .APX_BITS(APX_BITS)) u_add (
      .a(run[i-1]), .b(a & {N{b[i]}}), .cin(1'b0), .approx(approx),
      .sum(rsum[i]), .cout(rco[i])
    );
    assign prod[i] = rsum[i][0];
    if (i < N - 1) begin : g_next
      assign run[i] = {rco[i], rsum[i][N-1:1]};
    end
  end

  assign run[N-1]      = '0;
  assign prod[2*N-1:N] = {rco[N-1], rsum[N-1][N-1:1]};

endmodule
