// tb_min_unit: self-checking test of the minimum finder.
//
// Applies random distance vectors, many with ties and equal entries, and
// checks the minimum value and that the lowest template number wins a tie.
module tb_min_unit;
  import spike_pkg::*;

  localparam int unsigned NT = 3;
  localparam int unsigned DW = dist_w(16, 64);
  localparam int unsigned TW = $clog2(NT);

  logic [NT-1:0][DW-1:0] dists;
  logic [DW-1:0]         min_val;
  logic [TW-1:0]         min_idx;
  int checks = 0, failures = 0;

  min_unit #(.NT(NT), .DW(DW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint best; int bi;
    for (int n = 0; n < 3000; n++) begin
      for (int t = 0; t < NT; t++) begin
        if (n % 3 == 0) dists[t] = DW'($urandom_range(0, 3));          // ties
        else            dists[t] = DW'({$urandom, $urandom});
      end
      #1;
      best = longint'(dists[0]); bi = 0;
      for (int t = 1; t < NT; t++)
        if (longint'(dists[t]) < best) begin best = longint'(dists[t]); bi = t; end
      checks++;
      if (longint'(min_val) != best || int'(min_idx) != bi) begin
        failures++;
        if (failures < 10)
          $display("n=%0d got %0d/%0d exp %0d/%0d", n, min_val, min_idx, best, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
