// tb_trigger_in - external trigger edges give one pulse after 3 clocks,
// a held level gives no further pulse, software trigger gives a pulse after 1.
module tb_trigger_in;
  logic clk = 0, rst = 1, ext_trig = 0, soft_trig = 0, trig;
  int checks = 0, failures = 0, pulses = 0, cyc = 0, t_edge, t_seen;

  trigger_in dut (.clk, .rst, .ext_trig, .soft_trig, .trig);

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 5; n++) begin
      @(negedge clk); ext_trig = 1; t_edge = cyc;
      pulses = 0; t_seen = -1;
      repeat (12) begin
        @(posedge clk); #1;
        if (trig) begin pulses++; if (t_seen < 0) t_seen = cyc; end
      end
      chk(pulses == 1, "one pulse per external edge");
      chk(t_seen - t_edge == 3, $sformatf("external latency %0d", t_seen - t_edge));
      @(negedge clk); ext_trig = 0;
      repeat (6) begin @(posedge clk); #1; chk(!trig, "no pulse on falling edge"); end
    end
    for (int n = 0; n < 5; n++) begin
      @(negedge clk); soft_trig = 1; t_edge = cyc;
      @(negedge clk); soft_trig = 0;
      @(posedge clk); #1;
      chk(!trig, "soft pulse one cycle only");
    end
    // soft pulse latency
    @(negedge clk); soft_trig = 1;
    @(posedge clk); #1; chk(trig, "soft trigger after one clock");
    @(negedge clk); soft_trig = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
