// tb_alu_steer: self-checking test of the dual-ALU steering logic. Every
// combination of instruction class, operand use and producer state of the two
// instructions ahead (over a small register set, so matches are frequent) is
// compared with the rules written out here: an ALU operation whose nearest
// producer of a used source is late goes to the late ALU; a load/store base
// or multiply operand in that situation stalls; a store's data never stalls.
module tb_alu_steer;
  logic id_valid, id_is_alu, id_is_mem, id_is_mul, id_use_rs, id_use_rt;
  logic [4:0] id_rs, id_rt, ex_rd, d1_rd;
  logic ex_wen, ex_late, d1_wen, d1_late, go_late, stall;
  int checks = 0, failures = 0;

  alu_steer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit late_src(logic [4:0] r);
    if (r == 0) return 0;
    if (ex_wen && ex_rd == r) return ex_late;
    if (d1_wen && d1_rd == r) return d1_late;
    return 0;
  endfunction

  initial begin
    for (int cls = 0; cls < 4; cls++)            // 0 alu, 1 mem, 2 mul, 3 other
      for (int u = 0; u < 4; u++)
        for (int e = 0; e < 4; e++)
          for (int d = 0; d < 4; d++)
            for (int rs = 0; rs < 3; rs++)
              for (int rt = 0; rt < 3; rt++)
                for (int er = 0; er < 3; er++)
                  for (int dr = 0; dr < 3; dr++)
                    for (int v = 0; v < 2; v++) begin
                      bit exp_late, exp_stall, ps, pt;
                      id_valid = v[0];
                      id_is_alu = (cls == 0); id_is_mem = (cls == 1); id_is_mul = (cls == 2);
                      id_use_rs = u[0]; id_use_rt = u[1];
                      id_rs = 5'(rs); id_rt = 5'(rt);
                      ex_wen = e[0]; ex_late = e[1]; ex_rd = 5'(er);
                      d1_wen = d[0]; d1_late = d[1]; d1_rd = 5'(dr);
                      #1;
                      ps = id_use_rs && late_src(id_rs);
                      pt = id_use_rt && late_src(id_rt);
                      exp_late  = v[0] && cls == 0 && (ps || pt);
                      exp_stall = v[0] && ((cls == 1 && ps) || (cls == 2 && (ps || pt)));
                      checks++;
                      if (go_late !== exp_late || stall !== exp_stall) begin
                        failures++;
                        if (failures < 10)
                          $display("FAIL cls %0d u %0d e %0d d %0d rs %0d rt %0d er %0d dr %0d: late %b stall %b",
                                   cls, u, e, d, rs, rt, er, dr, go_late, stall);
                      end
                    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
