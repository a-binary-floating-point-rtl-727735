// tb_sd_coder - self-checking test of the SD coder.
// Random magnitudes and signs; each output is evaluated as an SD integer and
// must equal +a or -a according to the sign, using only the codes 00, 01, 11.
module tb_sd_coder;
  localparam int NV = 5000;
  logic clk = 1'b0;
  logic s1, s2;
  logic [25:0] a1, a2;
  logic [51:0] x, y;
  int checks = 0, failures = 0;

  sd_coder dut (.s1, .s2, .a1, .a2, .x, .y);

  always #5 clk = ~clk;

  function automatic longint val(logic [51:0] v);
    longint r = 0;
    for (int i = 25; i >= 0; i--) begin
      if (v[2*i +: 2] == 2'b10) return 64'h7fffffff_ffffffff;
      r = 2 * r + ((v[2*i +: 2] == 2'b01) ? 1 : (v[2*i +: 2] == 2'b11) ? -1 : 0);
    end
    return r;
  endfunction

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NV; n++) begin
      s1 = 1'($urandom); s2 = 1'($urandom); a1 = 26'($urandom); a2 = 26'($urandom);
      @(negedge clk);
      checks++;
      if (val(x) != (s1 ? -longint'(a1) : longint'(a1)) ||
          val(y) != (s2 ? -longint'(a2) : longint'(a2))) begin
        failures++;
        if (failures < 10) $display("FAIL s=%b%b a=%h %h -> %h %h", s1, s2, a1, a2, x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
