// tb_perm_net: self-checking test of the cyclic-shift permutation network.
//
// A forward and an inverse network are chained. For random message vectors
// and every shift 0..80 the forward output must equal in[(i+s) mod 81] and
// the inverse network must restore the original vector.
module tb_perm_net;
  localparam int Z = 81;
  localparam int W = 7;

  logic [6:0]   shift;
  logic [W-1:0] din [Z], mid [Z], dout [Z];
  int checks = 0, failures = 0;

  perm_net #(.Z(Z), .W(W), .INVERSE(1'b0)) u_fwd (.shift(shift), .din(din), .dout(mid));
  perm_net #(.Z(Z), .W(W), .INVERSE(1'b1)) u_inv (.shift(shift), .din(mid), .dout(dout));

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int s = 0; s < Z; s++) begin
        for (int i = 0; i < Z; i++) din[i] = W'($urandom);
        shift = 7'(s);
        #1;
        for (int i = 0; i < Z; i++) begin
          checks += 2;
          if (mid[i] != din[(i + s) % Z]) begin
            failures++;
            if (failures < 10) $display("FAIL fwd s=%0d i=%0d", s, i);
          end
          if (dout[i] != din[i]) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
