// tb_l1_buffer_occupation -- checks occupancy (L0 minus L1 pointer, modulo
// 4096) and the full condition, including wrapped pointers.
module tb_l1_buffer_occupation;
  logic [11:0] l0_ptr, l1_ptr, occupancy;
  logic full;
  int checks = 0, failures = 0;
  l1_buffer_occupation dut (.l0_ptr, .l1_ptr, .occupancy, .full);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s l0=%0d l1=%0d", m, l0_ptr, l1_ptr); end
  endtask
  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic int occ = (i < 5) ? 4095 - i : $urandom_range(0, 4095);
      l1_ptr = 12'($urandom_range(0, 4095));
      l0_ptr = 12'((int'(l1_ptr) + occ) % 4096);
      #1;
      check(occupancy == 12'(occ), "occupancy");
      check(full == (occ == 4095), "full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
