// tb_csm_mult_r2: exhaustive check of the radix-2 multiplier at n = 5,
// two's complement (default) and unsigned, against the product computed by
// the simulator.
module tb_csm_mult_r2;
  localparam int N = 5;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] zs, zu;
  int checks = 0, failures = 0;

  csm_mult_r2 dut_s (.x(x), .y(y), .z(zs), .msd_c(), .msd_s());
  csm_mult_r2 #(.N(N), .SIGNED(1'b0)) dut_u (.x(x), .y(y), .z(zu), .msd_c(), .msd_s());

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        logic [2*N-1:0] ps, pu;
        x = N'(a);
        y = N'(b);
        #1;
        ps = (2*N)'($signed({{N{x[N-1]}}, x}) * $signed({{N{y[N-1]}}, y}));
        pu = (2*N)'({{N{1'b0}}, x} * {{N{1'b0}}, y});
        checks += 2;
        if (zs != ps) begin
          failures++;
          if (failures < 10) $display("FAIL signed %0d*%0d = %h exp %h", a, b, zs, ps);
        end
        if (zu != pu) begin
          failures++;
          if (failures < 10) $display("FAIL unsigned %0d*%0d = %h exp %h", a, b, zu, pu);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
