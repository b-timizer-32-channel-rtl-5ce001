// tb_hit_merger -- random TDC hit pairs; the expected merged word is built
// field by field from the documented merged-data layout.
module tb_hit_merger;
  logic [31:0] a, b, m;
  logic bv;
  logic [7:0] ref_hi;
  int checks = 0, failures = 0;
  hit_merger dut (.hit_a(a), .hit_b(b), .b_valid(bv), .ref_coarse_hi(ref_hi), .merged(m));
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s a=%h b=%h m=%h", s, a, b, m); end
  endtask
  initial begin
    for (int i = 0; i < 3000; i++) begin
      automatic logic [4:0] cha = 5'($urandom), chb = 5'($urandom);
      automatic logic [10:0] ca = 11'($urandom), cb = 11'($urandom);
      automatic logic [7:0] fa = 8'($urandom), fb = 8'($urandom);
      automatic bit ce;
      ref_hi = ca[10:3];
      if (i % 3 == 0) cb[10:3] = ca[10:3];
      if (i % 7 == 0) begin ref_hi = ca[10:3] + 8'd1; end
      a = {4'b0100, 1'b0, 3'd5, cha, ca, fa};
      b = {4'b0100, 1'b0, 3'd5, chb, cb, fb};
      bv = (i % 5) != 0;
      #1;
      ce = (ca[10:3] != ref_hi) || (bv && cb[10:3] != ref_hi);
      check(m[31:28] == 4'b0100 && m[27] == 1'b1, "type and merged bit");
      check(m[26] == ce, "coarse error");
      check(m[12:8] == cha && m[7:5] == ca[2:0] && m[4:0] == fa[7:3], "hit A field");
      if (bv) check(m[25:21] == chb && m[20:18] == cb[2:0] && m[17:13] == fb[7:3], "hit B field");
      else    check(m[25:13] == 13'd0, "empty B field");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
