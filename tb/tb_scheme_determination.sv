// tb_scheme_determination: feeds every value of Stride_s and compares s with a
// trailing-zero count computed here bit by bit (d-1 for the unused value zero).
// Also checks the worked value Stride_s = 12 -> s = 2.
module tb_scheme_determination;
  localparam int unsigned D   = pm_pkg::STRIDE_W;
  localparam int unsigned S_W = $clog2(D);

  logic [D-1:0]   str;
  logic [S_W-1:0] s;
  int checks = 0, failures = 0;

  scheme_determination #(.STRIDE_W(D)) dut (.str(str), .s(s));

  function automatic int unsigned tz(input int unsigned v);
    int unsigned n = 0;
    if (v == 0) return D - 1;
    while (((v >> n) & 1) == 0) n++;
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    str = 12; #1;
    checks++;
    if (s !== 2) begin failures++; $display("FAIL str=12 s=%0d", s); end
    for (int unsigned v = 0; v < (1 << D); v++) begin
      str = D'(v); #1;
      checks++;
      if (s !== S_W'(tz(v))) begin
        failures++;
        if (failures < 10) $display("FAIL str=%0d s=%0d exp %0d", v, s, tz(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
