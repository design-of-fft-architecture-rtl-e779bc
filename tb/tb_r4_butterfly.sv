// tb_r4_butterfly: random inputs (and full-scale ones) to the radix-4
// butterfly, compared with y_m = sum_i a_i (-j)^(m i) evaluated with
// complex rotation by quarter turns.
module tb_r4_butterfly;
  int checks = 0, failures = 0;
  localparam int W = 9;
  logic signed [W-1:0] ar [4], ai [4];
  logic signed [W+1:0] yr [4], yi [4];

  r4_butterfly #(.W(W)) dut (
    .a0r(ar[0]), .a0i(ai[0]), .a1r(ar[1]), .a1i(ai[1]),
    .a2r(ar[2]), .a2i(ai[2]), .a3r(ar[3]), .a3i(ai[3]),
    .y0r(yr[0]), .y0i(yi[0]), .y1r(yr[1]), .y1i(yi[1]),
    .y2r(yr[2]), .y2i(yi[2]), .y3r(yr[3]), .y3i(yi[3]));

  task automatic run_one();
    #1;
    for (int m = 0; m < 4; m++) begin
      int sr, si;
      sr = 0; si = 0;
      for (int i = 0; i < 4; i++) begin
        int r, q, t;
        r = int'(ar[i]); q = int'(ai[i]);
        // multiply by (-j)^(m*i): each quarter turn maps (r,q) -> (q,-r)
        for (int k = 0; k < (m * i) % 4; k++) begin
          t = r; r = q; q = -t;
        end
        sr += r; si += q;
      end
      checks++;
      if (int'(yr[m]) != sr || int'(yi[m]) != si) begin
        failures++;
        $display("FAIL y%0d = (%0d,%0d) exp (%0d,%0d)", m, yr[m], yi[m], sr, si);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin ar[i] = -256; ai[i] = -256; end
    run_one();
    for (int i = 0; i < 4; i++) begin ar[i] = 255; ai[i] = -256; end
    run_one();
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 4; i++) begin
        ar[i] = W'($urandom); ai[i] = W'($urandom);
      end
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
