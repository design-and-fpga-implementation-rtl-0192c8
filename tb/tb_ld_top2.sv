// tb_ld_top2 -- random vectors (with forced ties) into a max-mode and a
// min-mode comparator; the two extreme values and the lowest index of the
// first one are compared with values found here by counting.
module tb_ld_top2;
  localparam int N = 25;
  localparam int W = 18;

  int checks = 0, failures = 0;
  logic signed [W-1:0] v [N];
  logic signed [W-1:0] mx1, mx2, mn1, mn2;
  logic [4:0] mxi, mni;

  ld_top2 #(.N(N), .W(W), .FIND_MIN(1'b0)) u_max (.v_i(v), .first_o(mx1), .second_o(mx2), .idx_o(mxi));
  ld_top2 #(.N(N), .W(W), .FIND_MIN(1'b1)) u_min (.v_i(v), .first_o(mn1), .second_o(mn2), .idx_o(mni));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int sorted [N];
      int e_mxi, e_mni;
      for (int k = 0; k < N; k++) begin
        v[k] = W'($urandom);
        if (t % 3 == 0) v[k] = W'($signed($urandom_range(0, 6)) - 3);
      end
      if (t % 4 == 1) v[$urandom_range(0, N-1)] = v[$urandom_range(0, N-1)];
      #1;
      // extremes by counting: the second value equals the first when the
      // first occurs more than once
      begin
        int mx, mn, cmx, cmn, mx2e, mn2e;
        mx = int'(v[0]); mn = int'(v[0]);
        for (int k = 1; k < N; k++) begin
          if (int'(v[k]) > mx) mx = int'(v[k]);
          if (int'(v[k]) < mn) mn = int'(v[k]);
        end
        cmx = 0; cmn = 0; mx2e = -(1 << 30); mn2e = (1 << 30);
        for (int k = 0; k < N; k++) begin
          if (int'(v[k]) == mx) cmx++; else if (int'(v[k]) > mx2e) mx2e = int'(v[k]);
          if (int'(v[k]) == mn) cmn++; else if (int'(v[k]) < mn2e) mn2e = int'(v[k]);
        end
        sorted[N-1] = mx; sorted[N-2] = (cmx > 1) ? mx : mx2e;
        sorted[0]   = mn; sorted[1]   = (cmn > 1) ? mn : mn2e;
      end
      e_mxi = -1; e_mni = -1;
      for (int k = 0; k < N; k++) begin
        if (e_mxi < 0 && int'(v[k]) == sorted[N-1]) e_mxi = k;
        if (e_mni < 0 && int'(v[k]) == sorted[0])   e_mni = k;
      end
      checks++;
      if (int'(mx1) != sorted[N-1] || int'(mx2) != sorted[N-2] || int'(mxi) != e_mxi) begin
        failures++;
        $display("FAIL max: %0d %0d %0d expected %0d %0d %0d", mx1, mx2, mxi, sorted[N-1], sorted[N-2], e_mxi);
      end
      checks++;
      if (int'(mn1) != sorted[0] || int'(mn2) != sorted[1] || int'(mni) != e_mni) begin
        failures++;
        $display("FAIL min: %0d %0d %0d expected %0d %0d %0d", mn1, mn2, mni, sorted[0], sorted[1], e_mni);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
