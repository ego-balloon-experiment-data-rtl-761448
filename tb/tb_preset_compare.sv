// tb_preset_compare -- exhaustive check of the accept gate: for every word A (0..511) held
// as its one's complement and every preset 2**k (k = 0..8), go must be 1 exactly when
// A >= 2**k; with process_all set, go is always 1.
module tb_preset_compare;
  import ego_pkg::*;
  logic [RW-1:0] reg_a, mask;
  logic          pall, go;
  int checks = 0, failures = 0;

  preset_compare dut (.reg_a(reg_a), .preset_mask(mask), .process_all(pall), .go(go));

  initial begin
    for (int k = 0; k < int'(RW); k++) begin
      for (int n = 0; n < (1 << RW); n++) begin
        for (int p = 0; p < 2; p++) begin
          logic exp_go;
          reg_a  = ~RW'(n);
          mask   = '0;
          for (int i = k; i < int'(RW); i++) mask[i] = 1'b1;
          pall   = p[0];
          exp_go = pall || (n >= (1 << k));
          #1;
          checks++;
          if (go !== exp_go) begin
            failures++;
            if (failures < 10) $display("FAIL A=%0d k=%0d all=%0d go=%0d", n, k, pall, go);
          end
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
