// tb_l1_fifo -- order of entries, watermark full at 12, sticky overflow from
// 15 stored entries (also written into later entries), and reset.
module tb_l1_fifo;
  import btim_pkg::*;
  logic clk = 0, rst_n = 0, sreset = 0, push = 0, pop = 0;
  l1_entry_t wr, rd;
  logic not_empty, full, overflow;
  logic [4:0] count;
  int checks = 0, failures = 0;
  l1_entry_t q [$];

  l1_fifo dut (.clk, .rst_n, .sreset, .push, .wr_data(wr), .pop, .rd_data(rd), .not_empty, .full, .overflow, .count);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s count=%0d", m, count); end
  endtask

  initial begin
    wr = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // random traffic staying below the overflow level
    for (int i = 0; i < 500; i++) begin
      push = (q.size() < 10) && ($urandom_range(0, 1) == 1);
      pop  = $urandom_range(0, 1) == 1;
      wr   = '{ptr: 12'($urandom), id: 2'($urandom), ovf: 1'b1};
      if (pop && q.size() > 0) begin
        check(rd.ptr == q[0].ptr && rd.id == q[0].id, "FIFO order");
        check(rd.ovf == 1'b0, "no overflow recorded");
      end
      @(negedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(wr);
      check(count == 5'(q.size()), "count");
      check(full == (q.size() >= 12), "watermark");
    end
    push = 0; pop = 1;
    while (q.size() > 0) begin
      check(rd.ptr == q[0].ptr, "drain before fill");
      @(negedge clk); void'(q.pop_front());
    end
    pop = 0;
    // fill up
    while (q.size() < 16) begin
      push = 1; wr = '{ptr: 12'(q.size()), id: 2'(q.size()), ovf: 1'b0};
      @(negedge clk); q.push_back(wr);
      check(full == (q.size() >= 12), "watermark fill");
      check(overflow == (q.size() > 15), "overflow after 15 stored");
    end
    push = 1; @(negedge clk); push = 0;     // dropped: FIFO full
    check(count == 16, "push dropped when full");
    check(overflow, "overflow sticky");
    pop = 1;
    for (int i = 0; i < 16; i++) begin
      check(rd.ptr == 12'(i), "drain order");
      @(negedge clk);
    end
    pop = 0;
    check(!not_empty && overflow, "empty but overflow kept");
    push = 1; wr = '0; @(negedge clk); push = 0;
    check(rd.ovf == 1'b1, "overflow flag stored with entry");
    sreset = 1; @(negedge clk); sreset = 0;
    check(!overflow && !not_empty, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
