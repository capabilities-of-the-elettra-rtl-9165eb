// tb_zbt_ctrl - the controller with a ZBT SRAM model (1024-word memory so
// that the ring wraps): VME write/read-back, ring recording across the wrap
// with a trigger and post-trigger count (trigger address and memory contents
// checked word by word), looped playback with back-pressure, and the read
// latency of four clocks.
module tb_zbt_ctrl;
  localparam int AW = 10, N = 1 << AW;
  logic clk = 0, rst = 1;
  logic arm = 0, trig = 0, wr_valid = 0, play_en = 0, play_ready = 1;
  logic [AW-1:0] post_trig = 0, play_len = 0, trig_addr;
  logic [31:0] wr_data = 0, play_data, vme_rdata, vme_wdata = 0;
  logic recording, done, play_valid, playing;
  logic vme_req = 0, vme_we = 0, vme_ack;
  logic [AW-1:0] vme_addr = 0, sram_a;
  logic sram_ce_n, sram_we_n, sram_dq_oe;
  logic [31:0] sram_dq_o, sram_dq_i;
  logic [31:0] mirror [N];
  int checks = 0, failures = 0, cyc = 0;

  zbt_ctrl #(.ADDR_W(AW)) dut (.*);
  zbt_sram_model #(.ADDR_W(AW), .DEPTH(N)) ram (
    .clk, .a(sram_a), .ce_n(sram_ce_n), .we_n(sram_we_n),
    .dq_from_fpga(sram_dq_o), .fpga_oe(sram_dq_oe), .dq_to_fpga(sram_dq_i));

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  task automatic vme_access(input bit we, input int a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    vme_req = 1; vme_we = we; vme_addr = AW'(a); vme_wdata = d;
    do @(posedge clk); while (!vme_ack);
    #1 r = vme_rdata;
    @(negedge clk);
    vme_req = 0;
  endtask

  initial begin
    logic [31:0] r;
    int t_trig, post, sent, t0, idx;
    foreach (mirror[i]) mirror[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;

    // 1. VME write / read back
    for (int n = 0; n < 40; n++) begin
      int a = $urandom % N; logic [31:0] d = $urandom;
      vme_access(1, a, d, r); mirror[a] = d;
    end
    for (int a = 0; a < N; a += 7) begin
      vme_access(0, a, 0, r);
      chk(r == mirror[a], $sformatf("vme read %0d: %h vs %h", a, r, mirror[a]));
    end

    // 2. ring recording: words 0..; trigger with word t_trig; post words after
    t_trig = 1500; post = 200;
    @(negedge clk); post_trig = AW'(post); arm = 1;
    @(negedge clk); arm = 0;
    sent = 0;
    while (sent < t_trig + post + 50) begin
      wr_valid = ($urandom % 5 != 0);
      wr_data  = 32'hA000_0000 + 32'(sent);
      trig     = wr_valid && sent == t_trig;
      @(posedge clk);
      if (wr_valid) begin
        if (sent <= t_trig + post) mirror[sent % N] = wr_data;
        sent++;
      end
      @(negedge clk);
      trig = 0;
    end
    wr_valid = 0;
    repeat (4) @(posedge clk);
    chk(done && !recording, "recording done");
    chk(trig_addr == AW'(t_trig % N), $sformatf("trigger address %0d", trig_addr));
    for (int a = 0; a < N; a++) begin
      vme_access(0, a, 0, r);
      chk(r == mirror[a], $sformatf("ring word %0d: %h vs %h", a, r, mirror[a]));
    end

    // 3. playback of 37 words, looped, with back-pressure
    @(negedge clk); play_len = 37; play_en = 1; t0 = cyc;
    idx = 0;
    while (idx < 300) begin
      @(posedge clk); #1;
      if (play_valid) begin
        if (idx == 0) chk(cyc - t0 == 4, $sformatf("first playback word after %0d clocks", cyc - t0));
        chk(play_data == mirror[idx % 37], $sformatf("playback %0d: %h", idx, play_data));
        idx++;
      end
      @(negedge clk); play_ready = ($urandom % 4 != 0);
    end
    chk(playing, "playing flag");
    // VME is held off during playback and served after it
    fork
      vme_access(0, 5, 0, r);
      begin repeat (30) @(posedge clk); chk(vme_req, "VME waits during playback"); @(negedge clk); play_en = 0; end
    join
    chk(r == mirror[5], "VME read after playback");
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
