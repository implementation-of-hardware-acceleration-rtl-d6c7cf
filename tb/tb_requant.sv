// tb_requant: checks the integer rescale / ReLU clamp against the reference
// function on random accumulators and constants, and on hand-picked edge cases
// (zero shift, negative accumulator, saturation, rounding ties).
module tb_requant;
  import aod_pkg::*;
  import aod_ref_pkg::*;

  acc_t    acc;
  qparam_t qp;
  pix_t    q;
  int checks = 0, failures = 0;

  requant dut (.acc(acc), .qp(qp), .q(q));

  task automatic check_one(int a, int m, int sh, int z);
    int exp;
    acc = a; qp = '0; qp.m = MBITS'(m); qp.sh = SBITS'(sh); qp.zy = DBITS'(z);
    #1;
    exp = rq(longint'(a), m, sh, z);
    checks++;
    if (int'(q) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%0d m=%0d sh=%0d z=%0d got %0d exp %0d", a, m, sh, z, q, exp);
    end
  endtask

  initial begin
    // edge cases
    check_one(0, 1, 0, 0);
    check_one(100, 1, 0, 0);
    check_one(-100, 1, 0, 7);
    check_one(300, 1, 0, 0);
    check_one(3, 1, 1, 0);      // 1.5 rounds to 2
    check_one(5, 1, 2, 10);     // 1.25 -> 1, +10
    check_one(6, 1, 2, 10);     // 1.5 -> 2, +10
    check_one(-7, 3, 1, 200);   // -10.5 -> -10 -> clamped to 200
    check_one(1000000, 65535, 20, 0);
    check_one(-2000000000, 65535, 40, 0);
    for (int i = 0; i < 5000; i++)
      check_one(int'($urandom) >>> ($urandom_range(0, 24)), $urandom_range(0, 65535),
                $urandom_range(0, 40), $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
