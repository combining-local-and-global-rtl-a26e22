// Self-checking testbench of global_stride_detect.
// Directed cases (the X/Y/Z example with d = 8, unequal deltas, zero delta,
// missing successor, negative d) and random vectors with a reference compare.
module tb_global_stride_detect;
  import pf_pkg::*;
  logic ok0, ok1, match;
  addr_t base0, succ0, base1, succ1;
  delta_t delta;
  int checks = 0, failures = 0;

  global_stride_detect dut (.*);

  task automatic t(bit o0, addr_t b0, addr_t s0, bit o1, addr_t b1, addr_t s1,
                   bit exp_m, delta_t exp_d);
    ok0 = o0; base0 = b0; succ0 = s0; ok1 = o1; base1 = b1; succ1 = s1;
    #1;
    checks++;
    if (match !== exp_m || (exp_m && delta !== exp_d)) begin
      failures++;
      $display("FAIL %h %h %h %h -> %0d %0d", b0, s0, b1, s1, match, delta);
    end
  endtask

  initial begin
    t(1, 32'h2000, 32'h2008, 1, 32'h1000, 32'h1008, 1, 8);
    t(1, 32'h2000, 32'h2010, 1, 32'h1000, 32'h1008, 0, 0);
    t(1, 32'h2000, 32'h2000, 1, 32'h1000, 32'h1000, 0, 0);
    t(0, 32'h2000, 32'h2008, 1, 32'h1000, 32'h1008, 0, 0);
    t(1, 32'h2000, 32'h2008, 0, 32'h1000, 32'h1008, 0, 0);
    t(1, 32'h2000, 32'h1FC0, 1, 32'h1000, 32'h0FC0, 1, -64);
    for (int n = 0; n < 200; n++) begin
      automatic addr_t b0 = $urandom, b1 = $urandom;
      automatic addr_t d0 = $urandom_range(3) == 0 ? 0 : $urandom_range(4096);
      automatic addr_t d1 = $urandom_range(1) ? d0 : $urandom_range(4096);
      t(1, b0, b0 + d0, 1, b1, b1 + d1, (d0 == d1) && d0 != 0, delta_t'(d0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
