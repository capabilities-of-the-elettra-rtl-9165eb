// tb_data_redirector - random control bits and streams; checks that each
// output follows the routing rule in the same cycle (no register stage).
module tb_data_redirector;
  logic clk = 0, rst = 1;
  logic fwd_en = 0, ram_wr_en = 0, fwd_src_ram = 0, live_valid = 0, play_valid = 0;
  logic [31:0] live_data = 0, play_data = 0, fwd_data, ram_data;
  logic fwd_valid, ram_valid;
  logic [31:0] e_fd, e_rd; logic e_fv, e_rv;
  int checks = 0, failures = 0, n_both = 0, n_play = 0;

  data_redirector #(.W(32)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      {fwd_en, ram_wr_en, fwd_src_ram, live_valid, play_valid} = 5'($urandom);
      live_data = $urandom; play_data = $urandom;
      e_fv = fwd_en && (fwd_src_ram ? play_valid : live_valid);
      e_fd = fwd_src_ram ? play_data : live_data;
      e_rv = ram_wr_en && live_valid;
      e_rd = live_data;
      if (e_fv && e_rv) n_both++;
      if (e_fv && fwd_src_ram) n_play++;
      #1;
      checks++;
      if (fwd_valid !== e_fv || ram_valid !== e_rv || (e_fv && fwd_data !== e_fd) || (e_rv && ram_data !== e_rd)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d fv=%b/%b rv=%b/%b", n, fwd_valid, e_fv, ram_valid, e_rv);
      end
    end
    checks++; if (n_both == 0 || n_play == 0) failures++;
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
