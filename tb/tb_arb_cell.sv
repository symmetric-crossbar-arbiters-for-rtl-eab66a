// tb_arb_cell -- exhaustive test of one arbitration cell.
//
// Applies all 64 combinations of R, OPB, XI, YI, XP, YP and checks G, XO and
// YO against the cell's truth table written out here as conditions: a grant
// needs a request, an unblocked port, and for each direction either a free
// chain or the priority mark; a chain output is free when its input side was
// free and the cell did not grant.
module tb_arb_cell;
  logic r, opb, xi, yi, xp, yp, xo, yo, g;
  int checks = 0, failures = 0;

  arb_cell dut (.r, .opb, .xi, .yi, .xp, .yp, .xo, .yo, .g);

  initial begin
    for (int v = 0; v < 64; v++) begin
      bit eg, ex, ey;
      {r, opb, xi, yi, xp, yp} = 6'(v);
      #1;
      if (r == 1 && opb == 0 && (xi == 1 || xp == 1) && (yi == 1 || yp == 1)) eg = 1;
      else eg = 0;
      ex = (xi || xp) && !eg;
      ey = (yi || yp) && !eg;
      checks += 3;
      if (g !== eg)  begin failures++; $display("FAIL v=%0d g=%b exp %b", v, g, eg); end
      if (xo !== ex) begin failures++; $display("FAIL v=%0d xo=%b exp %b", v, xo, ex); end
      if (yo !== ey) begin failures++; $display("FAIL v=%0d yo=%b exp %b", v, yo, ey); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
