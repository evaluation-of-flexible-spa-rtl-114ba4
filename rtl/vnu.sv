// vnu: variable node update for one variable node.
//
// In this flooding decoder the variable node keeps no state of its own. Its
// arithmetic sits on the two sides of the check node pipeline:
//
//  * Read side (towards the check nodes): the message to a check node is the
//    channel LLR plus the sum of all check node messages of the previous
//    iteration minus the one this check node sent:
//        v2c = sat(ch + (sum_prev - c2v_old))
//    In the first iteration (first_iter) the channel LLR is sent unchanged.
//    With c2v_old = 0 the same path gives the a-posteriori LLR ch + sum.
//  * Write side (from the check nodes): each new check node message is added
//    to the running column sum of the current iteration; the first message of
//    a column in an iteration starts from zero (first_touch):
//        acc_new = sat((first_touch ? 0 : acc_old) + c2v_new)
//
// Both results saturate to their widths. Purely combinational: one
// subtracter, two adders and the selection multiplexers. The formulas are
// those of the source design's data flow; saturation and the widths are this
// design's choices.
module vnu #(
  parameter int W     = ldpc_pkg::NOF_BITS_DEF,  // message width
  parameter int SUM_W = ldpc_pkg::NOF_BITS_DEF   // column sum width
) (
  // read side
  input  logic                    first_iter,
  input  logic signed [W-1:0]     ch,
  input  logic signed [SUM_W-1:0] sum_prev,
  input  logic signed [W-1:0]     c2v_old,
  output logic signed [W-1:0]     v2c,
  // write side
  input  logic                    first_touch,
  input  logic signed [SUM_W-1:0] acc_old,
  input  logic signed [W-1:0]     c2v_new,
  output logic signed [SUM_W-1:0] acc_new
);

  localparam int XW = ((W > SUM_W) ? W : SUM_W) + 2;

  localparam logic signed [XW-1:0] W_MAX = XW'((1 << (W - 1)) - 1);
  localparam logic signed [XW-1:0] W_MIN = -XW'(1 << (W - 1));
  localparam logic signed [XW-1:0] S_MAX = XW'((1 << (SUM_W - 1)) - 1);
  localparam logic signed [XW-1:0] S_MIN = -XW'(1 << (SUM_W - 1));

  logic signed [XW-1:0] ext, acc;

  always_comb begin
    ext = XW'(ch) + (XW'(sum_prev) - XW'(c2v_old));
    if (first_iter)      v2c = ch;
    else if (ext > W_MAX) v2c = W_MAX[W-1:0];
    else if (ext < W_MIN) v2c = W_MIN[W-1:0];
    else                 v2c = ext[W-1:0];

    acc = (first_touch ? XW'(0) : XW'(acc_old)) + XW'(c2v_new);
    if (acc > S_MAX)      acc_new = S_MAX[SUM_W-1:0];
    else if (acc < S_MIN) acc_new = S_MIN[SUM_W-1:0];
    else                  acc_new = acc[SUM_W-1:0];
  end

endmodule
