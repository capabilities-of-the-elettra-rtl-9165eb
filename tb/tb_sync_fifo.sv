// tb_sync_fifo - random pushes and pops against a queue model; checks data
// order, empty/full/count, fill to full and drain to empty.
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [$clog2(D):0] count;
  logic [31:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  sync_fifo #(.W(32), .DEPTH(D)) dut (.*);

  always #4 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(count == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      chk(empty == (q.size() == 0) && full == (q.size() == D), "flags");
      if (q.size() > 0) chk(rd_data == q[0], "head");
      if (full) n_full++;
      if (empty) n_empty++;
      // phases: fill, drain, random
      case ((n / 250) % 3)
        0: begin wr_en = 1; rd_en = ($urandom % 4 == 0); end
        1: begin wr_en = ($urandom % 4 == 0); rd_en = 1; end
        default: begin wr_en = $urandom; rd_en = $urandom; end
      endcase
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && q.size() < D + (rd_en ? 1 : 0) && !full) q.push_back(wr_data);
    end
    chk(n_full > 0 && n_empty > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
