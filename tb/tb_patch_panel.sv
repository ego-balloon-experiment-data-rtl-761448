// tb_patch_panel -- drives random track and memory states through the two standard patch
// boards and compares every register bit, its word and plug flags, the index, ID, C and
// sensitivity outputs with the Mark II/III and Mark IV track assignments written out here
// independently (track numbers 1..16 as in the format tables).
module tb_patch_panel;
  import ego_pkg::*;
  patch_cfg_t cfg;
  logic [NTRACK-1:0] det, mem;
  logic idx, id_now, cbit_now, sens_d, sens_w2;
  reg_in_t a_in, b_in, c_in;
  int checks = 0, failures = 0;

  patch_panel dut (.cfg(cfg), .det(det), .mem(mem), .idx(idx), .id_now(id_now),
                   .cbit_now(cbit_now), .sens_d(sens_d), .sens_w2(sens_w2), .a_in(a_in),
                   .b_in(b_in), .c_in(c_in));

  // Expected track number (0 = unplugged) and word (2 = word II) of each register bit.
  int m23_a[9] = '{1, 2, 3, 4, 5, 6, 7, 0, 0};
  int m23_b[9] = '{8, 9, 10, 11, 12, 13, 14, 0, 0};
  int m23_c[9] = '{15, 0, 0, 0, 0, 0, 0, 0, 0};
  int m4_a[9]  = '{1, 2, 3, 4, 5, 6, 7, 10, 11};
  int m4_b[9]  = '{1, 2, 3, 4, 5, 6, 7, 10, 11};
  int m4_c[9]  = '{12, 13, 14, 15, 16, 12, 13, 14, 15};
  int m4_cw[9] = '{1, 1, 1, 1, 1, 2, 2, 2, 2};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic trk(input logic [NTRACK-1:0] v, input int tn);
    return (tn == 0) ? 1'b0 : v[tn - 1];
  endfunction

  task automatic check_reg(input string nm, input reg_in_t r, input int tn[9], input int wd[9]);
    for (int i = 0; i < 9; i++) begin
      check(r.used[i] == (tn[i] != 0), $sformatf("%s%0d used", nm, i));
      check(r.d[i] == trk(mem, tn[i]), $sformatf("%s%0d data", nm, i));
      if (tn[i] != 0) check(r.w2[i] == (wd[i] == 2), $sformatf("%s%0d word", nm, i));
    end
  endtask

  initial begin
    int w1[9] = '{1, 1, 1, 1, 1, 1, 1, 1, 1};
    int w2[9] = '{2, 2, 2, 2, 2, 2, 2, 2, 2};
    for (int trial = 0; trial < 200; trial++) begin
      det = NTRACK'($urandom);
      mem = NTRACK'($urandom);
      cfg = mark23_panel();
      #1;
      check(!cfg.mark4, "Mark II/III board format flag");
      check(idx == det[15], "Mark II/III index on track 16");
      check(cbit_now == mem[14], "Mark II/III C bit on track 15");
      check(sens_d == 1'b0, "Mark II/III has no sensitivity bit");
      check_reg("A", a_in, m23_a, w1);
      check_reg("B", b_in, m23_b, w1);
      check_reg("C", c_in, m23_c, w1);
      cfg = mark4_panel();
      #1;
      check(cfg.mark4, "Mark IV board format flag");
      check(idx == det[8], "Mark IV index on track 9");
      check(id_now == mem[7], "Mark IV ID on track 8");
      check(sens_d == mem[15] && sens_w2, "Mark IV sensitivity on track 16, word II");
      check_reg("A", a_in, m4_a, w1);
      check_reg("B", b_in, m4_b, w2);
      check_reg("C", c_in, m4_c, m4_cw);
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
