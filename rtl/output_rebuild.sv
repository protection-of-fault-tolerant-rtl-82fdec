// output_rebuild: recomputes one data-filter output from a check-filter
// output and the other data outputs that the check covers.
//
// For data filter I and check J (I must take part in J):
//   rec = z_J - sum of y_m over the other data filters m in check J
// e.g. y1 rebuilt as z1 - y2 - y3 in the four-filter bank. The fault
// corrector holds up to three of these per data output and votes between
// them, so one faulty rebuild adder cannot reach the output.
//
// Interface and timing: combinational. y are the K data-filter outputs, z the
// output of check filter J (wider, same LSB weight); rec is truncated to the
// data-output width OUT_W, which it fits in whenever the inputs are
// consistent.
(* keep_hierarchy *)
module output_rebuild
  import ft_filter_pkg::*;
#(
  parameter int unsigned K         = K_DEF,
  parameter int unsigned I         = 0,
  parameter int unsigned J         = recon_check(K, I),
  parameter int unsigned OUT_W     = OUT_W_DEF,
  parameter int unsigned CHK_OUT_W = OUT_W + 2
) (
  input  logic signed [OUT_W-1:0]     y [K],
  input  logic signed [CHK_OUT_W-1:0] z,
  output logic signed [OUT_W-1:0]     rec
);

  localparam int unsigned DW = CHK_OUT_W + 2;

  initial assert (in_check(K, J, I)) else $error("output_rebuild: filter I is not in check J");

  logic signed [DW-1:0] acc;

  always_comb begin
    acc = DW'(z);
    for (int unsigned m = 0; m < K; m++)
      if (m != I && in_check(K, J, m)) acc -= DW'(y[m]);
    rec = OUT_W'(acc);
  end

endmodule
