// tb_link_delay: checks that the link register chain delays random data by
// exactly DEPTH clocks, for a 4-stage 8-bit link and a 1-stage 3-bit link.
module tb_link_delay;
  logic       clk = 1'b0;
  logic [7:0] din8, dout8;
  logic [2:0] din3, dout3;
  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] hist8 [$];
  logic [2:0] hist3 [$];

  always #5 clk = ~clk;

  link_delay #(.W(8), .DEPTH(4)) dut4 (.clk, .din(din8), .dout(dout8));
  link_delay #(.W(3), .DEPTH(1)) dut1 (.clk, .din(din3), .dout(dout3));

  initial begin
    din8 = '0;
    din3 = '0;
    for (cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      // value presented DEPTH clocks ago must be at the output now
      if (hist8.size() >= 4) begin
        checks++;
        if (dout8 !== hist8[hist8.size()-4]) begin
          failures++;
          $display("FAIL depth 4 at %0d: %h vs %h", cyc, dout8, hist8[hist8.size()-4]);
        end
      end
      if (hist3.size() >= 1) begin
        checks++;
        if (dout3 !== hist3[hist3.size()-1]) begin
          failures++;
          $display("FAIL depth 1 at %0d: %h vs %h", cyc, dout3, hist3[hist3.size()-1]);
        end
      end
      din8 = 8'($urandom);
      din3 = 3'($urandom);
      hist8.push_back(din8);
      hist3.push_back(din3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
