// tb_sdfa - exhaustive self-checking test of one signed-digit adder cell.
//
// Every combination of x_i, y_i, x_{i-1}, y_{i-1} in {-1,0,1} is applied with
// every carry c_{i-1} that the cell below can produce for that neighbour pair
// (same sign as x_{i-1}+y_{i-1}, or 0). Checked: c_i follows the ADD1 rule,
// z_i = x_i + y_i - 2c_i + c_{i-1}, and z_i is a valid digit. One vector per
// clock cycle.
module tb_sdfa;
  import sdfp_pkg::*;

  logic clk = 1'b0;
  sd_digit_t xi, yi, xl, yl, cl, ci, zi;
  int checks = 0, failures = 0;

  sdfa dut (.xi, .yi, .xl, .yl, .cl, .ci, .zi);

  always #5 clk = ~clk;

  function automatic sd_digit_t enc(int v);
    return (v > 0) ? 2'b01 : (v < 0) ? 2'b11 : 2'b00;
  endfunction
  function automatic int dec(sd_digit_t d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : 0;
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int u, ul, c_exp;
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        for (int al = -1; al <= 1; al++)
          for (int bl = -1; bl <= 1; bl++)
            for (int cc = -1; cc <= 1; cc++) begin
              ul = al + bl;
              if (ul == 2 && cc != 1) continue;
              if (ul == -2 && cc != -1) continue;
              if (ul == 0 && cc != 0) continue;
              if (ul == 1 && cc == -1) continue;
              if (ul == -1 && cc == 1) continue;
              xi = enc(a); yi = enc(b); xl = enc(al); yl = enc(bl); cl = enc(cc);
              @(negedge clk);
              u = a + b;
              if (u == 2) c_exp = 1;
              else if (u == -2) c_exp = -1;
              else if (u == 0) c_exp = 0;
              else if (u * ul > 0) c_exp = u;
              else c_exp = 0;
              checks++;
              if (dec(ci) != c_exp || ci == 2'b10 || zi == 2'b10 ||
                  dec(zi) != u - 2 * c_exp + cc) begin
                failures++;
                $display("FAIL x=%0d y=%0d xl=%0d yl=%0d cl=%0d: c=%b z=%b", a, b, al, bl, cc, ci, zi);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
