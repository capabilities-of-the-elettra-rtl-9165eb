// tb_fpdp_demux - for every ratio 1..12 streams numbered words (with random
// gaps) and checks that port k gets words k, k+N, k+2N, ... one clock after
// they enter, that DVALID marks exactly ports 0..N-1 and that SYNC comes with
// word 0 only.
module tb_fpdp_demux;
  localparam int NP = 12;
  logic clk = 0, rst = 1, enable = 0, start = 0, in_valid = 0;
  logic [3:0] ratio = 1;
  logic [31:0] in_data = 0;
  logic [NP-1:0][31:0] p_data;
  logic [NP-1:0] p_strobe, p_dvalid, p_sync;
  int checks = 0, failures = 0, sent, exp_port;

  fpdp_demux #(.NPORTS(NP)) dut (.*);

  always #4 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk); enable = 1;
    for (int r = 1; r <= NP; r++) begin
      @(negedge clk); ratio = 4'(r); start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < NP; k++) chk(p_dvalid[k] == (k < r), $sformatf("dvalid r=%0d k=%0d", r, k));
      sent = 0;
      for (int c = 0; c < 30 * r; c++) begin
        in_valid = ($urandom % 4 != 0);
        in_data  = 32'h5A00_0000 + 32'(r << 16) + 32'(sent);
        @(posedge clk); #1;
        if (in_valid) begin
          exp_port = sent % r;
          chk(p_strobe == (NP'(1) << exp_port), $sformatf("strobe r=%0d word %0d: %b", r, sent, p_strobe));
          chk(p_data[exp_port] == in_data, "port data");
          chk(p_sync == ((sent < r) ? NP'(1) : NP'(0)), "sync held on port 0 until its next word");
          sent++;
        end else begin
          chk(p_strobe == '0, "no strobe without input");
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
    // disable clears DVALID
    enable = 0;
    @(posedge clk); #1;
    chk(p_dvalid == '0, "disable clears dvalid");
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
