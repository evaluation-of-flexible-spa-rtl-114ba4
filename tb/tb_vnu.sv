// tb_vnu: self-checking test of the variable node update arithmetic.
//
// Random and corner-case operands are applied with 7-bit messages and both a
// 7-bit and a 10-bit column sum; results are compared with integer
// arithmetic and saturation computed here.
module tb_vnu;
  localparam int W = 7;
  int checks = 0, failures = 0;

  function automatic int sat(int x, int bits);
    int mx = (1 << (bits - 1)) - 1;
    int mn = -(1 << (bits - 1));
    return (x > mx) ? mx : (x < mn) ? mn : x;
  endfunction

  function automatic int sx(int v, int bits);   // sign-extend a bit pattern
    v = v & ((1 << bits) - 1);
    return (v >= (1 << (bits - 1))) ? v - (1 << bits) : v;
  endfunction

  // two instances: sum width 7 and 10
  logic                first_iter, first_touch;
  logic signed [W-1:0] ch, c2v_old, c2v_new, v2c_a, v2c_b;
  logic signed [6:0]   sp_a, ao_a, an_a;
  logic signed [9:0]   sp_b, ao_b, an_b;

  vnu #(.W(W), .SUM_W(7))  u_a (.first_iter, .ch, .sum_prev(sp_a), .c2v_old, .v2c(v2c_a),
                                .first_touch, .acc_old(ao_a), .c2v_new, .acc_new(an_a));
  vnu #(.W(W), .SUM_W(10)) u_b (.first_iter, .ch, .sum_prev(sp_b), .c2v_old, .v2c(v2c_b),
                                .first_touch, .acc_old(ao_b), .c2v_new, .acc_new(an_b));

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int vch, vold, vnew, vsa, vsb, vaa, vab;
      first_iter  = ($urandom_range(0, 7) == 0);
      first_touch = $urandom_range(0, 1);
      vch  = (n < 4) ? ((n & 1) ? 63 : -64) : sx($urandom, 7);
      vold = (n < 4) ? ((n & 1) ? -64 : 63) : sx($urandom, 7);
      vnew = sx($urandom, 7);
      vsa  = (n < 4) ? ((n & 1) ? 63 : -64) : sx($urandom, 7);
      vsb  = sx($urandom, 10);
      vaa  = sx($urandom, 7);
      vab  = sx($urandom, 10);
      ch = W'(vch); c2v_old = W'(vold); c2v_new = W'(vnew);
      sp_a = 7'(vsa); sp_b = 10'(vsb); ao_a = 7'(vaa); ao_b = 10'(vab);
      #1;
      checks += 4;
      if (int'(v2c_a) != (first_iter ? vch : sat(vch + vsa - vold, 7))) failures++;
      if (int'(v2c_b) != (first_iter ? vch : sat(vch + vsb - vold, 7))) failures++;
      if (int'(an_a) != sat((first_touch ? 0 : vaa) + vnew, 7)) failures++;
      if (int'(an_b) != sat((first_touch ? 0 : vab) + vnew, 10)) begin
        failures++;
        if (failures < 10) $display("FAIL acc %0d %0d %0d -> %0d", first_touch, vab, vnew, an_b);
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
