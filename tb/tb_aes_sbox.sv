// tb_aes_sbox: exhaustive check of the computed forward S-box.
//
// All 256 inputs are applied and compared with the reference table built by
// brute-force inversion in aes_ref_pkg, plus three well-known entries
// (S(00)=63, S(53)=ED, S(FF)=16). A watchdog ends the run if it hangs.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(input logic [7:0] x, input logic [7:0] exp);
    in_byte = x;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", x, out_byte, exp);
    end
  endtask

  initial begin
    ref_init();
    check(8'h00, 8'h63);
    check(8'h53, 8'hed);
    check(8'hff, 8'h16);
    for (int x = 0; x < 256; x++) check(8'(x), sbox_tab[x]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
