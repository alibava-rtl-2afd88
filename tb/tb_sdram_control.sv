// tb_sdram_control: random writes and reads across all banks against the
// SDRAM model; read data must match a reference array, the model must see
// no protocol error, refreshes must keep coming at the 7.8 us interval, and
// a write must take T_RCD + T_WR + T_RP clocks.
module tb_sdram_control;
  import alibava_pkg::*;
  logic clk = 0, rst = 1;
  logic req_valid = 0, req_we = 0, req_ready, rd_valid, init_done;
  sdram_addr_t req_addr = '0;
  word_t req_wdata = '0, rd_data, dq_o, dq_i;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba, dqm;
  logic [12:0] a;
  word_t ref_mem [int];
  int checks = 0, failures = 0;
  longint cyc = 0;

  sdram_model mem (.clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a,
                   .dq_in(dq_o), .dq_out(dq_i));
  sdram_control #(.INIT_WAIT(400)) dut (.clk, .rst, .req_valid, .req_we, .req_addr,
    .req_wdata, .req_ready, .rd_data, .rd_valid, .init_done,
    .sd_cke(cke), .sd_cs_n(cs_n), .sd_ras_n(ras_n), .sd_cas_n(cas_n), .sd_we_n(we_n),
    .sd_ba(ba), .sd_a(a), .sd_dqm(dqm), .sd_dq_o(dq_o), .sd_dq_oe(dq_oe), .sd_dq_i(dq_i));
  always #12.5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input bit we, input sdram_addr_t ad, input word_t d, output word_t q,
                        output int took);
    longint t0;
    @(posedge clk); #1;
    req_valid = 1; req_we = we; req_addr = ad; req_wdata = d;
    while (!req_ready) begin @(posedge clk); #1; end
    t0 = cyc;
    @(posedge clk); #1;
    req_valid = 0;
    if (!we) begin
      while (!rd_valid) begin @(posedge clk); #1; end
      q = rd_data;
    end else begin
      while (!req_ready) begin @(posedge clk); #1; end
    end
    took = int'(cyc - t0);
  endtask

  initial begin
    word_t q, d;
    int took, min_wr = 1000;
    sdram_addr_t ad;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      if (ref_mem.num() == 0 || $urandom_range(0, 1)) begin
        ad = (i < 8) ? sdram_addr_t'(i * 512) : sdram_addr_t'($urandom);
        d = word_t'($urandom);
        access(1, ad, d, q, took);
        ref_mem[int'(ad)] = d;
        if (took < min_wr) min_wr = took;
      end else begin
        int keys[$];
        keys.delete();
        foreach (ref_mem[k]) keys.push_back(k);
        ad = sdram_addr_t'(keys[$urandom_range(0, keys.size() - 1)]);
        access(0, ad, '0, q, took);
        check(q == ref_mem[int'(ad)], $sformatf("read %h at %h exp %h", q, ad, ref_mem[int'(ad)]));
      end
    end
    check(mem.errors == 0, $sformatf("%0d protocol errors", mem.errors));
    check(min_wr == 1 + 2 + 1, $sformatf("write took %0d clocks", min_wr));
    // refresh rate: one per 312 clocks after initialisation
    check(mem.refreshes >= 2 + int'(cyc - 420) / 312 - 1 && mem.refreshes <= 2 + int'(cyc) / 312 + 1,
          $sformatf("%0d refreshes in %0d clocks", mem.refreshes, cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
