// Test of the behavioural stage model: a 20-comparator stage with PN and a
// 10-comparator stage without. Random inputs and PN bits are applied before
// each rising edge; after it the comparator word and the amplified residue
// must match values computed here from the stage equations.
// A third instance with random comparator offsets (rms 0.1*Delta) and DAC
// element errors (rms 1%), and a linear amplifier of gain 8, is swept slowly
// across the input range: each comparator's switching point gives its
// offset, and the jump of V_dac = V_in - V_o/8 where a comparator switches
// gives twice its element size. The rms of both must match the requested
// spread. A fourth instance with thermal noise of rms 1e-3 is held at a
// fixed input; the spread of its output must be 8e-3 rms.
module tb_mdac_stage_model;

  logic        clk = 1'b0, pn = 1'b0;
  real         vin = 0.0, vo20, vo10;
  logic [19:0] th20;
  logic [9:0]  th10;
  int checks = 0, failures = 0;

  mdac_stage_model #(.M(20), .HAS_PN(1'b1), .BETA1(7.76), .BETA3(-12.8)) dut20 (
    .clk, .vin, .pn, .thermo(th20), .vo(vo20));
  mdac_stage_model #(.M(10), .HAS_PN(1'b0), .BETA1(7.58), .BETA3(-14.95)) dut10 (
    .clk, .vin, .pn, .thermo(th10), .vo(vo10));

  real         vn = 0.0, von, voz;
  logic [19:0] thn, thz;
  mdac_stage_model #(.M(20), .HAS_PN(1'b1), .BETA1(8.0), .BETA3(0.0),
                     .OFS_SIGMA(0.1), .MISMATCH_SIGMA(0.01), .SEED(11)) dutn (
    .clk, .vin(vn), .pn(1'b0), .thermo(thn), .vo(von));
  mdac_stage_model #(.M(20), .HAS_PN(1'b1), .BETA1(8.0), .BETA3(0.0),
                     .NOISE_RMS(1.0e-3), .SEED(5)) dutz (
    .clk, .vin(0.0), .pn(1'b0), .thermo(thz), .vo(voz));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      real x, v20, v10;
      int  k20, k10;
      bit  p;
      @(negedge clk);
      x = 0.999 * (2.0 * real'($urandom) / 4294967295.0 - 1.0);
      p = 1'($urandom);
      vin = x; pn = p;
      // expected: k = number of reference levels below the input
      k20 = 0; k10 = 0;
      for (int j = 0; j < 20; j++) if (x > -0.95 + 0.1 * j) k20++;
      for (int j = 0; j < 10; j++) if (x > -0.9 + 0.2 * j) k10++;
      v20 = x - 0.05 * (2 * k20 - 20 + (p ? 1 : -1));
      v10 = x - 0.1 * (2 * k10 - 10);
      @(posedge clk);
      #1;
      checks += 4;
      if ($countones(th20) != k20 || th20 != 20'((64'(1) << k20) - 1)) begin failures++; $display("FAIL th20"); end
      if ($countones(th10) != k10 || th10 != 10'((64'(1) << k10) - 1)) begin failures++; $display("FAIL th10"); end
      if (fabs(vo20 - (7.76 * v20 - 12.8 * v20 * v20 * v20)) > 1e-9) begin failures++; $display("FAIL vo20"); end
      if (fabs(vo10 - (7.58 * v10 - 14.95 * v10 * v10 * v10)) > 1e-9) begin failures++; $display("FAIL vo10"); end
    end
    // sweep of the imperfect stage, and noise of the noisy one
    begin
      localparam int NSTEP = 200000;
      real sw [20], ofs_sq = 0.0, mm_sq = 0.0, z_sum = 0.0, z_sq = 0.0;
      real vdac_prev, x_prev, ofs_rms, mm_rms, z_rms;
      logic [19:0] th_prev;
      int n_mm = 0, n_sw = 0;
      foreach (sw[j]) sw[j] = 9.0;
      for (int t = 0; t < NSTEP; t++) begin
        real x, vdac;
        @(negedge clk);
        x = -0.9999 + 1.9998 * real'(t) / real'(NSTEP);
        vn = x;
        @(posedge clk);
        #1;
        vdac = x - von / 8.0;
        z_sum += voz;
        z_sq  += voz * voz;
        if (t > 0 && thn != th_prev) begin
          for (int j = 0; j < 20; j++)
            if (thn[j] && !th_prev[j] && sw[j] > 8.0) begin
              sw[j] = x;
              n_sw++;
              // exactly one comparator switched: V_dac jumps by 2*elem[j]
              if ($countones(thn ^ th_prev) == 1) begin
                real e;
                e = (vdac - vdac_prev) / 0.1 - 1.0;
                mm_sq += e * e;
                n_mm++;
              end
            end
        end
        th_prev = thn;
        vdac_prev = vdac;
        x_prev = x;
      end
      for (int j = 0; j < 20; j++) begin
        real o;
        o = sw[j] - (-0.95 + 0.1 * j);
        ofs_sq += o * o;
      end
      ofs_rms = $sqrt(ofs_sq / 20.0) / 0.1;
      mm_rms  = (n_mm > 0) ? $sqrt(mm_sq / n_mm) : 0.0;
      z_rms   = $sqrt(z_sq / NSTEP - (z_sum / NSTEP) * (z_sum / NSTEP));
      $display("offset rms %g Delta (0.1), element error rms %g (0.01) from %0d jumps, noise %g (8e-3)",
               ofs_rms, mm_rms, n_mm, z_rms);
      checks += 4;
      if (n_sw != 20) begin failures++; $display("FAIL: not every comparator switched"); end
      if (ofs_rms < 0.05 || ofs_rms > 0.2) begin failures++; $display("FAIL: offset spread"); end
      if (n_mm < 10 || mm_rms < 0.004 || mm_rms > 0.025) begin failures++; $display("FAIL: element error spread"); end
      if (z_rms < 7.6e-3 || z_rms > 8.4e-3) begin failures++; $display("FAIL: noise rms"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
