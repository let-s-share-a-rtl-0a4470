// tb_srm_top_five: the end-to-end test of tb_srm_top run on the five-share
// configuration (SDEP = 1, shares x0 x1 r y0 y1, common share r).
//
// Each block is 16 bytes, refreshed on entry with random bytes, shared freshly (x = x0^x1^r,
// alpha*x = r^y0^y1) and streamed back to back, one per clock, under one tag
// key. Six kinds of block exercise the mechanisms of the scheme:
//   clean            : released unchanged, equal to S() of the bytes
//   value fault      : x0 of one byte corrupted, alpha not 0      -> detected
//   tag fault        : y0 of one byte corrupted                    -> detected
//   shared fault     : r corrupted (hits value and tag), alpha!=1 -> detected
//   critical key     : r corrupted with alpha = 1                 -> missed
//   zero key         : x0 corrupted with alpha = 0                 -> missed
// A detected block must be all zeros with fault high; a missed one is
// released with the faulty byte. Each kind must occur. The S-box results
// must appear 6 clocks after the input and the block one clock after the
// 16th result.
module tb_srm_top_five;
  import tb_srm_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, sbox_valid, blk_valid, fault;
  logic [4:0][7:0] in_sh, sbox_sh;
  logic [287:0] rnd;
  logic [3:0][7:0] rnd_ref;
  logic [7:0] alpha;
  logic [127:0] blk;
  int checks = 0, failures = 0;

  srm_top #(.SDEP(1)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sh(in_sh), .rnd(rnd), .rnd_ref(rnd_ref),
    .alpha(alpha), .sbox_valid(sbox_valid), .sbox_sh(sbox_sh), .blk_valid(blk_valid),
    .blk(blk), .fault(fault));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    for (int i = 0; i < 288; i += 32) rnd[i +: 32] = $urandom;
    rnd_ref = $urandom;
  end

  int cyc = 0;
  int first_in, first_out, blk_cyc, last_sbox;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sbox_valid) begin
      if (first_out < 0) first_out = cyc;
      last_sbox = cyc;
    end
    if (blk_valid) blk_cyc = cyc;
  end

  localparam int NKIND = 6;
  string kname [NKIND] = '{"clean", "value fault", "tag fault", "shared fault",
                           "critical key alpha=1", "zero key alpha=0"};
  int seen [NKIND];

  initial begin
    logic [127:0] want;
    logic         want_fault;
    logic [7:0]   x, d;
    int           pos, kind;
    rst_n = 1'b0; in_valid = 1'b0; in_sh = '0; alpha = '0;
    for (int k = 0; k < NKIND; k++) seen[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 60; b++) begin
      kind = b % NKIND;
      case (kind)
        4:       alpha = 8'h01;
        5:       alpha = 8'h00;
        default: begin
          alpha = 8'($urandom);
          while (alpha == 8'h00 || alpha == 8'h01) alpha = 8'($urandom);
        end
      endcase
      pos = $urandom % 16;
      want_fault = (kind >= 1 && kind <= 3);
      first_out = -1; blk_cyc = -1;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        if (i == 0) first_in = cyc;
        x = (b == 0 && i == 0) ? 8'h00 : 8'($urandom);
        in_sh[1] = 8'($urandom);
        in_sh[2] = 8'($urandom);
        in_sh[3] = 8'($urandom);
        in_sh[0] = x ^ in_sh[1] ^ in_sh[2];
        in_sh[4] = gm(alpha, x) ^ in_sh[2] ^ in_sh[3];
        d = 8'(1 + $urandom % 255);
        want[127 - 8*i -: 8] = sbox(x);
        if (i == pos) begin
          case (kind)
            1, 5: begin in_sh[0] ^= d; want[127 - 8*i -: 8] = sbox(x ^ d); end
            2:    in_sh[3] ^= d;
            3, 4: begin in_sh[2] ^= d; want[127 - 8*i -: 8] = sbox(x ^ d); end
            default: ;
          endcase
        end
        in_valid = 1'b1;
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (10) @(negedge clk);
      checks += 4;
      if (first_out - first_in != 6) begin
        failures++; $display("FAIL block %0d: S-box latency %0d", b, first_out - first_in);
      end
      if (blk_cyc - last_sbox != 1) begin
        failures++; $display("FAIL block %0d: check latency %0d", b, blk_cyc - last_sbox);
      end
      if (fault !== want_fault) begin
        failures++; $display("FAIL block %0d (%s): fault=%b", b, kname[kind], fault);
      end
      if (blk !== (want_fault ? 128'h0 : want)) begin
        failures++; $display("FAIL block %0d (%s): blk=%h want %h", b, kname[kind], blk, want);
      end else seen[kind]++;
    end
    for (int k = 0; k < NKIND; k++) begin
      checks++;
      $display("%-22s %0d", kname[k], seen[k]);
      if (seen[k] == 0) begin failures++; $display("FAIL mechanism never seen: %s", kname[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
