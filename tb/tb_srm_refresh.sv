// tb_srm_refresh: random sharings and random words into the four- and the
// five-share refresh gadget; the value and the tag recombinations must be
// unchanged and every share must actually change when its random words do not
// cancel.
module tb_srm_refresh;
  logic [3:0][7:0] x4, z4;
  logic [2:0][7:0] r4;
  logic [4:0][7:0] x5, z5;
  logic [3:0][7:0] r5;
  int checks = 0, failures = 0;

  srm_refresh #(.SDEP(2)) u4 (.x(x4), .rnd(r4), .z(z4));
  srm_refresh #(.SDEP(1)) u5 (.x(x5), .rnd(r5), .z(z5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int changed4, changed5;
    changed4 = 0; changed5 = 0;
    for (int n = 0; n < 2000; n++) begin
      x4 = 32'($urandom); r4 = 24'($urandom);
      x5 = 40'({$urandom, $urandom}); r5 = $urandom;
      #1;
      checks += 4;
      if ((z4[0]^z4[1]^z4[2]) !== (x4[0]^x4[1]^x4[2])) failures++;
      if ((z4[1]^z4[2]^z4[3]) !== (x4[1]^x4[2]^x4[3])) failures++;
      if ((z5[0]^z5[1]^z5[2]) !== (x5[0]^x5[1]^x5[2])) failures++;
      if ((z5[2]^z5[3]^z5[4]) !== (x5[2]^x5[3]^x5[4])) failures++;
      // exact gadget equations
      checks += 2;
      if (z4[3] !== (x4[3] ^ r4[0] ^ r4[1]) || z4[2] !== (x4[2] ^ r4[2] ^ r4[0])) failures++;
      if (z5[3] !== (x5[3] ^ r5[0] ^ r5[3]) || z5[4] !== (x5[4] ^ r5[3] ^ r5[2])) failures++;
      for (int k = 0; k < 4; k++) if (z4[k] != x4[k]) changed4++;
      for (int k = 0; k < 5; k++) if (z5[k] != x5[k]) changed5++;
    end
    checks++;
    if (changed4 < 7000 || changed5 < 9000) begin
      failures++;
      $display("FAIL shares not refreshed: %0d %0d", changed4, changed5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
