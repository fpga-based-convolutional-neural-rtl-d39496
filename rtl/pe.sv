// pe: one processing element of the convolution array.
//
// A PE owns one output pixel of the current tile and keeps a partial sum for
// every output channel of the weight block (N_ACC accumulators). Each cycle
// with `mac_en` it multiplies its input pixel `x` by the broadcast weight `w`
// at full precision and adds the product into accumulator `mac_addr`. The
// controller walks the output channel fastest, so the same accumulator is
// touched again only N_ACC cycles later. Before a tile the accumulators are
// preset with the bias, already aligned to product scale (`init_*`). The
// output stage reads accumulator `rd_addr` combinationally.
//
// Timing: one MAC per cycle, result visible on `rd_data` the cycle after the
// update. Init and MAC are never issued together; init wins if they are.
// Using a bias preset and keeping the partial sums inside the PE are choices
// of this implementation.
module pe #(
  parameter int W = 16,
  parameter int ACC_W = 32,
  parameter int N_ACC = 64,
  parameter int DW = 4,
  localparam int AW = (N_ACC > 1) ? $clog2(N_ACC) : 1
) (
  input  logic                    clk,
  input  logic                    init_en,
  input  logic [AW-1:0]           init_addr,
  input  logic signed [ACC_W-1:0] init_val,
  input  logic                    mac_en,
  input  logic [AW-1:0]           mac_addr,
  input  logic signed [W-1:0]     x,
  input  logic signed [W-1:0]     w,
  input  logic [AW-1:0]           rd_addr,
  output logic signed [ACC_W-1:0] rd_data
);
  logic signed [ACC_W-1:0] acc [N_ACC];
  logic signed [2*W-1:0]   prod;
  logic signed [W-1:0]     unused_res;

  fixed_mul #(.W(W), .DW(DW)) u_mul (
    .a(x), .b(w), .int_a('0), .int_b('0), .int_r('0),
    .prod(prod), .result(unused_res)
  );

  always_ff @(posedge clk) begin
    if (init_en)
      acc[init_addr] <= init_val;
    else if (mac_en)
      acc[mac_addr] <= acc[mac_addr] + ACC_W'(prod);
  end

  assign rd_data = acc[rd_addr];
endmodule
