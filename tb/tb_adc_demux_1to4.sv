// tb_adc_demux_1to4 - drives a new random sample every 2 ns (both edges of
// the 250 MHz clock) and checks that every 125 MHz word holds four
// consecutive samples, oldest in bits 7:0, that no sample is lost or
// repeated, and that the word is ready for the clk125 edge 16 ns after its
// oldest sample was captured.
module tb_adc_demux_1to4;
  logic       clk250 = 0, clk125 = 0, rst = 1;
  logic [7:0] adc_d = 0;
  logic [31:0] word;
  logic [7:0] smp [4096];
  int checks = 0, failures = 0;
  int k_next = -1, lat0 = -1;

  adc_demux_1to4 dut (.clk250, .clk125, .rst, .adc_d, .word);

  always #2 clk250 = ~clk250;                      // posedges at 2, 6, 10, ...
  initial begin #2; forever begin clk125 = ~clk125; #4; end end  // posedges at 2, 10, ...

  // sample k is put on the bus at 2k+1 ns and captured by the edge at 2k+2 ns
  initial begin
    foreach (smp[i]) smp[i] = 8'($urandom);
    for (int k = 0; k < 4096; k++) begin
      #1 adc_d = smp[k];
      #1;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL %s", what); end
  endtask

  int t_edge;
  always @(posedge clk125) begin
    t_edge = int'($time);
    #0.5;
    if (!rst && $time > 60 && $time < 8000) begin
      if (k_next < 0) begin
        // find where the stream starts: search the sample table
        for (int k = 0; k < 64; k++)
          if (word == {smp[k+3], smp[k+2], smp[k+1], smp[k]}) begin
            k_next = k;
            lat0   = t_edge - (2*k + 2);
            break;
          end
      end else begin
        chk(word == {smp[k_next+3], smp[k_next+2], smp[k_next+1], smp[k_next]},
            $sformatf("word %h expected samples from %0d", word, k_next));
        chk(t_edge - (2*k_next + 2) == lat0, "constant latency");
      end
      if (k_next >= 0) k_next += 4;
    end
  end

  initial begin
    #21 rst = 0;
    #8100;
    chk(k_next > 0, "stream found");
    chk(lat0 == 16, $sformatf("latency %0d ns", lat0));
    $display("latency oldest sample to word: %0d ns", lat0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
