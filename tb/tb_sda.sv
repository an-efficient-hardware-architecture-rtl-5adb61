// tb_sda: self-checking test of the squared-difference accumulator.
//
// Runs bursts of random length with random samples, including full-scale
// opposite values, and gaps in the enable, then checks the accumulated sum of
// squared differences two clocks after the last sample.
module tb_sda;
  import spike_pkg::*;

  localparam int unsigned WL  = 16;
  localparam int unsigned NSS = 64;
  localparam int unsigned DW  = dist_w(WL, NSS);

  logic clk = 1'b0;
  logic clr, en;
  logic signed [WL-1:0] x, y;
  logic [DW-1:0] acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sda #(.WL(WL), .NSS(NSS)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum, d;
    int len, sel;
    clr = 1'b1; en = 1'b0; x = '0; y = '0;
    @(negedge clk);
    for (int b = 0; b < 300; b++) begin
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      clr = 1'b0;
      sum = 0;
      len = $urandom_range(1, NSS);
      for (int k = 0; k < len; k++) begin
        en = ($urandom_range(0, 4) != 0);
        sel = $urandom_range(0, 3);
        unique case (sel)
          0:       begin x = 16'sh7fff; y = 16'sh8000; end
          1:       begin x = 16'sh8000; y = 16'sh7fff; end
          default: begin x = WL'($urandom); y = WL'($urandom); end
        endcase
        if (en) begin
          d = longint'(x) - longint'(y);
          sum += d * d;
        end
        @(negedge clk);
      end
      en = 1'b0;
      repeat (2) @(negedge clk);
      checks++;
      if (longint'(acc) != sum) begin
        failures++;
        if (failures < 10) $display("burst %0d: acc %0d exp %0d", b, acc, sum);
      end
      // accumulator holds while en is low
      @(negedge clk);
      checks++;
      if (longint'(acc) != sum) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
