// tb_aes_inv_round: one decryption round against the reference model.
//
// Random states and round keys, with and without the last-round flag, are
// compared with the reference inverse round. A round followed by its inverse
// undo a forward round: a last forward round with a zero key followed by a
// last inverse round with key k must give back the input state XOR k.
module tb_aes_inv_round;
  import aes_ref_pkg::*;

  blk_t in_state, round_key, out_state;
  logic last;
  int checks = 0, failures = 0;

  aes_inv_round dut (.in_state, .round_key, .last, .out_state);

  initial begin
    blk_t s, k, e;
    ref_init();
    for (int n = 0; n < 400; n++) begin
      s = rand_blk();
      k = rand_blk();
      in_state  = s;
      round_key = k;
      last      = (n % 4) == 0;
      #1;
      e = dec_round(s, k, last);
      checks++;
      if (out_state !== e) begin
        failures++;
        $display("FAIL inv_round(%032h, last=%0b) = %032h expected %032h", s, last, out_state, e);
      end
      // last inverse round undoes SubBytes and ShiftRows
      if (last) begin
        in_state = enc_round(s, '0, 1);
        #1;
        checks++;
        if (out_state !== (s ^ k)) begin
          failures++;
          $display("FAIL last inverse round does not undo last round");
        end
      end
    end
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
