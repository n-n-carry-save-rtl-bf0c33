// tb_csm_widths: both multipliers at several operand widths, signed and
// unsigned, over all operand pairs: radix 2 for n = 3 .. 9, radix 4 for
// n = 4 .. 10. Each width runs in its own process and is compared with the
// product computed by the simulator.
module tb_csm_widths;
  int checks = 0, failures = 0, done = 0;
  localparam int NRUNS = 2 * 7 + 2 * 4;

  for (genvar n = 3; n <= 10; n++) begin : g_n
    for (genvar sg = 0; sg < 2; sg++) begin : g_sg
      logic [n-1:0]   x, y;
      logic [2*n-1:0] z2, z4;
      if (n <= 9) begin : g_r2
        csm_mult_r2 #(.N(n), .SIGNED(sg)) u_r2 (.x(x), .y(y), .z(z2), .msd_c(), .msd_s());
      end else begin : g_no_r2
        assign z2 = '0;
      end
      if (n % 2 == 0) begin : g_r4
        csm_mult_r4 #(.N(n), .SIGNED(sg)) u_r4 (.x(x), .y(y), .z(z4), .msd_c1(), .msd_s1(),
                                                .msd_c0());
      end else begin : g_no_r4
        assign z4 = '0;
      end
      initial begin
        for (int a = 0; a < (1 << n); a++) begin
          for (int b = 0; b < (1 << n); b++) begin
            logic [2*n-1:0] p;
            x = n'(a);
            y = n'(b);
            #1;
            if (sg) p = (2*n)'($signed({{n{x[n-1]}}, x}) * $signed({{n{y[n-1]}}, y}));
            else    p = (2*n)'({{n{1'b0}}, x} * {{n{1'b0}}, y});
            if (n <= 9) begin
              checks++;
              if (z2 != p) begin
                failures++;
                if (failures < 10) $display("FAIL r2 n=%0d signed=%0d %0d*%0d", n, sg, a, b);
              end
            end
            if (n % 2 == 0) begin
              checks++;
              if (z4 != p) begin
                failures++;
                if (failures < 10) $display("FAIL r4 n=%0d signed=%0d %0d*%0d", n, sg, a, b);
              end
            end
          end
        end
        done += (n <= 9 ? 1 : 0) + (n % 2 == 0 ? 1 : 0);
      end
    end
  end

  initial begin
    wait (done == NRUNS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
