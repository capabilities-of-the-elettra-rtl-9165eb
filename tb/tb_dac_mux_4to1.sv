// tb_dac_mux_4to1 - a queue stands in for the FIFO.  Before START_DAC the DAC
// gets mid-scale; after it, every 250 MHz cycle must carry the next two
// samples of the queued words in order (oldest first), the first pair 12 ns
// after the clk125 edge that takes the start pulse, and an empty queue must
// give mid-scale and raise underflow.
module tb_dac_mux_4to1;
  logic clk250 = 0, clk125 = 0, rst = 1, start = 0, stop = 0;
  logic [31:0] fifo_data;
  logic fifo_empty, fifo_pop, running, underflow;
  logic [15:0] dac_d;
  logic [31:0] q[$];
  logic [7:0] exp_s[$];
  int checks = 0, failures = 0, t_start = -1, t_first = -1, n_idle_after = 0;
  bit seen_data = 0;

  dac_mux_4to1 dut (.*);

  always #2 clk250 = ~clk250;
  initial begin #2; forever begin clk125 = ~clk125; #4; end end

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 32'h0 : q[0];

  // sample the read strobe mid-cycle and pop just after the edge (no race)
  bit pop_s = 0;
  always @(negedge clk125) pop_s = fifo_pop;
  always @(posedge clk125) if (pop_s) begin #0.1; void'(q.pop_front()); end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  // watch the DAC bus
  always @(posedge clk250) begin
    int t; t = int'($time);
    #0.5;
    if (!rst) begin
      if (exp_s.size() > 0 && dac_d != 16'h8080 && !seen_data) begin
        seen_data = 1; t_first = t;
      end
      if (seen_data && exp_s.size() >= 2) begin
        chk(dac_d == {exp_s[1], exp_s[0]}, $sformatf("pair %h exp %h%h", dac_d, exp_s[1], exp_s[0]));
        void'(exp_s.pop_front()); void'(exp_s.pop_front());
      end else if (seen_data) begin
        chk(dac_d == 16'h8080, "mid-scale after the data");
        n_idle_after++;
      end else begin
        chk(dac_d == 16'h8080, "mid-scale before start");
      end
    end
  end

  initial begin
    logic [31:0] w;
    #21 rst = 0;
    for (int n = 0; n < 200; n++) begin
      w = $urandom | 32'h0000_0001;   // first sample never mid-scale
      q.push_back(w);
      for (int l = 0; l < 4; l++) exp_s.push_back(w[l*8 +: 8]);
    end
    #40;
    @(negedge clk125); start = 1;
    @(posedge clk125); t_start = int'($time);
    @(negedge clk125); start = 0;
    chk(running, "running after start");
    wait (q.size() == 0);
    repeat (8) @(posedge clk125);
    chk(underflow, "underflow after the FIFO ran dry");
    chk(exp_s.size() == 0, "all samples sent");
    chk(n_idle_after > 4, "mid-scale while empty");
    chk(t_first - t_start == 12, $sformatf("start to first pair %0d ns", t_first - t_start));
    @(negedge clk125); stop = 1;
    @(negedge clk125); stop = 0;
    chk(!running, "stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
