// tb_bfu: checks the Q5.10 butterfly against a reference computed with wide
// integers (products of the full values, floor division by 2^10, wrap to 16
// bits), for directed cases and random operands, and against real-valued
// complex arithmetic for small operands.
module tb_bfu;
  logic signed [15:0] tw_r, tw_i, a_r, a_i, b_r, b_i, ao_r, ao_i, bo_r, bo_i;
  int checks = 0, failures = 0;

  bfu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floordiv1024(longint x);
    longint q = x / 1024;
    if (x < 0 && q * 1024 != x) q--;
    return q;
  endfunction

  function automatic logic signed [15:0] wrap16(longint x);
    return 16'(x);
  endfunction

  task automatic run(input int twr, twi, ar, ai, br, bi);
    longint tr, ti;
    tw_r = 16'(twr); tw_i = 16'(twi); a_r = 16'(ar); a_i = 16'(ai);
    b_r = 16'(br); b_i = 16'(bi);
    #1;
    tr = floordiv1024(longint'(b_r) * tw_r - longint'(b_i) * tw_i);
    ti = floordiv1024(longint'(b_r) * tw_i + longint'(b_i) * tw_r);
    checks += 4;
    if (ao_r !== wrap16(a_r + tr) || ao_i !== wrap16(a_i + ti) ||
        bo_r !== wrap16(a_r - tr) || bo_i !== wrap16(a_i - ti)) begin
      failures++;
      $display("FAIL tw=(%0d,%0d) a=(%0d,%0d) b=(%0d,%0d): A'=(%0d,%0d) B'=(%0d,%0d)",
               tw_r, tw_i, a_r, a_i, b_r, b_i, ao_r, ao_i, bo_r, bo_i);
    end
  endtask

  initial begin
    // tw = 1: A' = A + B, B' = A - B
    run(1024, 0, 1024, 0, 512, 0);
    checks++;
    if (ao_r != 1536 || bo_r != 512 || ao_i != 0 || bo_i != 0) failures++;
    // tw = -j: B*tw = (b_i, -b_r)
    run(0, -1024, 100, 200, 300, 400);
    checks++;
    if (ao_r != 100 + 400 || ao_i != 200 - 300 || bo_r != 100 - 400 || bo_i != 200 + 300)
      failures++;
    // tw = w^4 = (724, -724): real check within a few LSBs
    run(724, -724, 0, 0, 1024, 1024);
    checks++;
    if (ao_r < 1446 || ao_r > 1449 || ao_i < -2 || ao_i > 0) begin
      failures++;
      $display("FAIL w^4 case: %0d %0d", ao_r, ao_i);
    end
    // negative products truncate toward minus infinity
    run(1, 0, 0, 0, -1, 0);
    checks++;
    if (ao_r != -1 || bo_r != 1) failures++;
    // random operands over the full range
    for (int k = 0; k < 2000; k++)
      run($urandom, $urandom, $urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
