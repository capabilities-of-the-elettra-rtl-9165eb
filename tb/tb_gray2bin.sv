// tb_gray2bin - checks the per-lane Gray decoder against b[i] = XOR of g[7:i].
module tb_gray2bin;
  logic        clk = 0, rst = 1;
  logic [31:0] in_word = 0, out_word, exp_q;
  int checks = 0, failures = 0;

  gray2bin dut (.clk, .rst, .in_word, .out_word);

  always #4 clk = ~clk;

  function automatic logic [31:0] ref_dec(logic [31:0] w);
    logic [31:0] r;
    for (int l = 0; l < 4; l++)
      for (int i = 0; i < 8; i++) r[l*8+i] = ^(w[l*8 +: 8] >> i);
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    // exhaustive over one lane value replicated, then random words
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_word = (n < 256) ? {4{n[7:0]}} ^ 32'h0102_0400 : $urandom;
      exp_q   = ref_dec(in_word);
      @(posedge clk); #1;
      checks++;
      if (out_word !== exp_q) begin
        failures++;
        if (failures < 5) $display("mismatch in=%h out=%h exp=%h", in_word, out_word, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
