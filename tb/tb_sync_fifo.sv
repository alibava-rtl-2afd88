// tb_sync_fifo: self-checking test of the FIFO link / frame buffer.
// Random pushes and pops are compared with a queue model; full, empty and
// count are checked every clock, including filling the FIFO to the top.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      bit do_wr, do_rd;
      // phase 1: mostly writes (reach full); phase 2: mixed; phase 3: drain
      do_wr = (cyc < 300) ? ($urandom_range(0, 3) != 0) : (cyc < 1700) ? $urandom_range(0, 1) : 0;
      do_rd = (cyc < 300) ? ($urandom_range(0, 5) == 0) : (cyc < 1700) ? $urandom_range(0, 1) : 1;
      if (do_wr && model.size() == D) do_wr = 0;   // a full FIFO takes no write
      if (do_rd && model.size() == 0) do_rd = 0;
      wr_en   <= do_wr;
      rd_en   <= do_rd;
      wr_data <= W'($urandom);
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(count == model.size(), "count");
      if (do_rd) check(rd_data == model[0], $sformatf("data %h exp %h", rd_data, model[0]));
      @(posedge clk);
      if (do_rd) void'(model.pop_front());
      if (do_wr) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
