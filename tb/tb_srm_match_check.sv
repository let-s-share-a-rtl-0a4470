// tb_srm_match_check: sends 16-byte blocks of (c, tau) pairs. Clean blocks
// (tau = alpha*c) must come out unchanged with fault low; blocks with one
// corrupted byte, at a random position, must come out as all zeros with fault
// high, except when the corruption happens to satisfy the check (a value-only
// fault with alpha = 0), which must pass undetected. out_valid must come one
// clock after the 16th byte, and gaps between bytes must be tolerated.
module tb_srm_match_check;
  import tb_srm_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid, fault;
  logic [7:0] c_in, tag_in, alpha;
  logic [127:0] blk;
  int checks = 0, failures = 0;

  srm_match_check #(.NBYTES(16)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .c_in(c_in), .tag_in(tag_in), .alpha(alpha), .out_valid(out_valid), .blk(blk), .fault(fault));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_clean = 0, n_detect = 0, n_miss = 0;

  initial begin
    logic [127:0] want;
    logic         want_fault;
    int           pos, kind;
    rst_n = 1'b0; in_valid = 1'b0; c_in = '0; tag_in = '0; alpha = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 200; b++) begin
      alpha = (b % 20 == 6) ? 8'h00 : 8'($urandom);
      kind  = b % 4;                 // 0,1: clean  2: value fault  3: tag fault
      pos   = $urandom % 16;
      want_fault = 1'b0;
      for (int i = 0; i < 16; i++) begin
        logic [7:0] c, t;
        @(negedge clk);
        while (($urandom % 5) == 0) begin in_valid = 1'b0; @(negedge clk); end
        c = 8'($urandom);
        t = gm(alpha, c);
        if (i == pos && kind == 2) begin
          c ^= 8'(1 + $urandom % 255);
          if (alpha != 0) want_fault = 1'b1;
        end
        if (i == pos && kind == 3) begin
          t ^= 8'(1 + $urandom % 255);
          want_fault = 1'b1;
        end
        want[127 - 8*i -: 8] = c;
        in_valid = 1'b1; c_in = c; tag_in = t;
        checks++;
        if (out_valid) begin failures++; $display("FAIL early out_valid"); end
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks += 2;
      if (!out_valid) begin failures++; $display("FAIL no out_valid after byte 16, block %0d", b); end
      else begin
        if (fault !== want_fault || blk !== (want_fault ? 128'h0 : want)) begin
          failures++;
          $display("FAIL block %0d kind %0d: fault %b want %b", b, kind, fault, want_fault);
        end
        if (kind < 2) n_clean++;
        else if (want_fault) n_detect++;
        else n_miss++;
      end
    end
    checks++;
    if (n_clean == 0 || n_detect == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL coverage clean=%0d detected=%0d undetectable=%0d", n_clean, n_detect, n_miss);
    end
    $display("clean=%0d detected=%0d undetectable=%0d", n_clean, n_detect, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
