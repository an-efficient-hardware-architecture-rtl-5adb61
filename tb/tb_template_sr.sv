// tb_template_sr: self-checking test of the template shift register.
//
// Programs a random template serially, then reads it back by rotation three
// times (with idle gaps) to check that rotation presents the samples in order
// and restores the contents; then reprograms and repeats.
module tb_template_sr;
  import spike_pkg::*;

  localparam int unsigned WL  = 16;
  localparam int unsigned NSS = 64;

  logic clk = 1'b0;
  logic load, rotate;
  logic signed [WL-1:0] data_in, data_out;
  int checks = 0, failures = 0;
  logic signed [WL-1:0] ref_t [NSS];

  always #5 clk = ~clk;

  template_sr #(.WL(WL), .NSS(NSS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; rotate = 1'b0; data_in = '0;
    @(negedge clk);
    for (int r = 0; r < 5; r++) begin
      for (int k = 0; k < NSS; k++) begin
        ref_t[k] = WL'($urandom);
        data_in  = ref_t[k];
        load     = 1'b1;
        rotate   = (k % 2 == 0);   // load has priority over rotate
        @(negedge clk);
      end
      load = 1'b0; rotate = 1'b0;
      repeat (3) @(negedge clk);
      for (int pass = 0; pass < 3; pass++) begin
        for (int k = 0; k < NSS; k++) begin
          checks++;
          if (data_out !== ref_t[k]) begin
            failures++;
            if (failures < 10) $display("r%0d pass%0d k%0d: %0d exp %0d", r, pass, k, data_out, ref_t[k]);
          end
          rotate = 1'b1;
          @(negedge clk);
          if ($urandom_range(0, 7) == 0) begin
            rotate = 1'b0;
            @(negedge clk);
          end
        end
        rotate = 1'b0;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
