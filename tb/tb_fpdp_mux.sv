// tb_fpdp_mux - the word sequence 0,1,2,... is split over N ports (word i on
// port i mod N) and each port sends its words with its own random delays;
// the output must be the original sequence.  Also checks the two-clock
// latency when every port is ready and the overflow flag.
module tb_fpdp_mux;
  localparam int NP = 12;
  logic clk = 0, rst = 1, start = 0;
  logic [3:0] ratio = 1;
  logic [NP-1:0][31:0] p_data = '0;
  logic [NP-1:0] p_dvalid = '0;
  logic [31:0] out_data;
  logic out_valid, overflow;
  int checks = 0, failures = 0, got, cyc = 0, t_in, lat;
  int nxt [NP];

  fpdp_mux #(.NPORTS(NP)) dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int r = 1; r <= NP; r++) begin
      @(negedge clk); ratio = 4'(r); start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < NP; k++) nxt[k] = k;
      got = 0;
      for (int c = 0; c < 40 * r + 40; c++) begin
        // port k may send its next word if not more than 2 turns ahead
        for (int k = 0; k < NP; k++) begin
          p_dvalid[k] = (k < r) && (nxt[k] < 20 * r) && (nxt[k] < got + 2 * r) && ($urandom % 3 != 0);
          p_data[k]   = 32'(r << 16) + 32'(nxt[k]);
          if (p_dvalid[k]) nxt[k] += r;
        end
        @(posedge clk); #1;
        if (out_valid) begin
          chk(out_data == 32'(r << 16) + 32'(got), $sformatf("r=%0d got %h exp %0d", r, out_data, got));
          got++;
        end
        @(negedge clk);
      end
      p_dvalid = '0;
      chk(got == 20 * r, $sformatf("r=%0d all words out (%0d)", r, got));
      chk(!overflow, "no overflow in normal use");
    end
    // latency: ratio 1, one word
    @(negedge clk); ratio = 1; start = 1;
    @(negedge clk); start = 0;
    p_dvalid[0] = 1; p_data[0] = 32'hCAFE_0001; t_in = cyc;
    @(negedge clk); p_dvalid[0] = 0;
    lat = -1;
    repeat (5) begin @(posedge clk); #1; if (out_valid && lat < 0) lat = cyc - t_in; end
    chk(lat == 2, $sformatf("latency %0d", lat));
    // overflow: port 1 sends 5 words while port 0 (whose turn it is) is silent
    @(negedge clk); ratio = 2; start = 1;
    @(negedge clk); start = 0;
    for (int n = 0; n < 5; n++) begin
      p_dvalid[1] = 1; p_data[1] = 32'(n);
      @(negedge clk);
    end
    p_dvalid[1] = 0;
    @(posedge clk); #1;
    chk(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
