// tb_buffer_mux -- drives random writes and reads through the Multiplexer
// into the ZBT SRAM model and checks: read data equals what was written,
// stored parity bits are the even byte parity, a corrupted word reports the
// right byte in rd_par_err, one write is accepted per 40 MHz cycle, and a
// read returns two clocks after it was issued.
module tb_buffer_mux;
  import btim_pkg::*;
  logic clk = 0, rst_n = 0;
  logic phase, wr_req = 0, wr_ack, rd_req = 0, rd_valid;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0, sram_addr;
  logic [WORD_W-1:0] wr_data = '0, rd_data;
  logic [PAR_W-1:0] rd_par_err;
  logic sram_we_n, sram_dq_oe;
  logic [MEM_W-1:0] sram_dq_o, sram_dq_i;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] ref_mem [logic [ADDR_W-1:0]];

  buffer_mux dut (.*);
  zbt_sram_model #(.AW(ADDR_W), .DW(MEM_W)) u_sram (
    .clk, .addr(sram_addr), .we_n(sram_we_n), .dq_i(sram_dq_o), .dq_o(sram_dq_i));

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", m, $time); end
  endtask

  task automatic do_write(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    wr_req = 1; wr_addr = a; wr_data = d;
    do @(posedge clk); while (!wr_ack);
    #1 wr_req = 0;
    ref_mem[a] = d;
  endtask

  task automatic do_read(logic [ADDR_W-1:0] a, output logic [WORD_W-1:0] d,
                         output logic [PAR_W-1:0] pe, output int lat);
    int n = 0;
    rd_req = 1; rd_addr = a;
    do begin @(posedge clk); n++; end while (!rd_valid);
    #1 rd_req = 0; d = rd_data; pe = rd_par_err; lat = n;
  endtask

  initial begin
    logic [WORD_W-1:0] d;
    logic [PAR_W-1:0] pe;
    int lat, t0, nw;
    repeat (3) @(negedge clk); rst_n = 1;
    // write throughput: 32 back-to-back writes
    t0 = 0;
    fork
      begin
        for (int i = 0; i < 32; i++) do_write(ADDR_W'(i * 977 + 5), $urandom);
      end
      begin
        nw = 0;
        repeat (70) begin @(posedge clk); if (wr_ack) nw++; end
      end
    join
    check(nw == 32, "32 writes in 64 clocks");
    // random mix
    for (int i = 0; i < 300; i++) begin
      automatic logic [ADDR_W-1:0] a = ADDR_W'($urandom);
      if ($urandom_range(0, 1) == 1 || ref_mem.size() == 0) do_write(a, $urandom);
      else begin
        void'(ref_mem.first(a));
        repeat ($urandom_range(0, 20)) void'(ref_mem.next(a));
        do_read(a, d, pe, lat);
        check(d == ref_mem[a], "read data");
        check(pe == 4'd0, "parity good");
        check(lat >= 2 && lat <= 4, "read latency");
        check(u_sram.mem[a][MEM_W-1:WORD_W] == byte_parity(ref_mem[a]), "stored parity");
      end
    end
    // corrupt byte 2 of a stored word
    do_write(ADDR_W'(123), 32'h12345678);
    repeat (4) @(posedge clk);
    u_sram.mem[123][20] = ~u_sram.mem[123][20];
    do_read(ADDR_W'(123), d, pe, lat);
    check(pe == 4'b0100, "parity error in byte 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
