// tb_srm_linear_map: checks Stage 1 against the tower basis rebuilt from its
// roots, for all 256 bytes on every share, and its one-clock latency.
module tb_srm_linear_map;
  import tb_srm_ref_pkg::*;
  localparam int NS = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [NS-1:0][7:0] x, y;
  int checks = 0, failures = 0;

  srm_linear_map #(.NS(NS)) dut (.clk(clk), .x(x), .y(y));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NS-1:0][7:0] xe;
    for (int v = 0; v < 256; v++) begin : g_v
      @(negedge clk);
      for (int k = 0; k < NS; k++) x[k] = 8'(v + 61 * k);
      xe = x;
      @(posedge clk); #1;
      for (int k = 0; k < NS; k++) begin
        checks++;
        if (y[k] != p2t(xe[k])) begin
          failures++;
          $display("FAIL x=%02x share %0d: got %02x want %02x", xe[k], k, y[k], p2t(xe[k]));
        end
      end
    end
    // the map must be a field isomorphism: 1 -> tower one (all ones)
    @(negedge clk); x = '0; x[0] = 8'h01;
    @(posedge clk); #1;
    checks++;
    if (y[0] != 8'hff) begin failures++; $display("FAIL map(1)=%02x", y[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
