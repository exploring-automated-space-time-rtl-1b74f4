// Self-checking test of phase_core: random gradient pairs (Sobel range and
// full S16 range) and the axis directions, against atan2 from real
// arithmetic mapped to 256 steps per turn. The result may differ from the
// exactly rounded angle by at most one step (modulo 256); axis directions
// must be exact, and (0,0) must give 0.
module tb_phase_core;
  import ovx_pkg::*;
  grad_pair_t grad;
  logic [7:0] phase;
  int checks = 0, failures = 0, exact_hits = 0;
  phase_core dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int x, y, e, d;
      real a;
      if (i % 2) begin x = int'($urandom % 2041) - 1020; y = int'($urandom % 2041) - 1020; end
      else begin x = int'(16'($urandom)) - 32768; y = int'(16'($urandom)) - 32768; end
      case (i)
        0: begin x = 100; y = 0; end
        2: begin x = 0; y = 100; end
        4: begin x = -100; y = 0; end
        6: begin x = 0; y = -100; end
        8: begin x = 0; y = 0; end
        10: begin x = 5; y = 5; end
        default: ;
      endcase
      grad.gx = 16'(x); grad.gy = 16'(y);
      #1;
      a = $atan2(real'(y), real'(x));
      if (a < 0) a += 2.0 * 3.14159265358979;
      e = int'($floor(a * 256.0 / (2.0 * 3.14159265358979) + 0.5)) % 256;
      if (x == 0 && y == 0) e = 0;
      d = (int'(phase) - e + 256) % 256;
      checks++;
      if (d == 0) exact_hits++;
      if (i <= 10 && i % 2 == 0) begin
        if (d != 0) begin failures++; $display("(%0d,%0d) got %0d exp %0d", x, y, phase, e); end
      end else if (d != 0 && d != 1 && d != 255) begin
        failures++; $display("(%0d,%0d) got %0d exp %0d", x, y, phase, e);
      end
    end
    // most results must be exactly rounded
    checks++;
    if (exact_hits < 18000) begin failures++; $display("only %0d exact", exact_hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
