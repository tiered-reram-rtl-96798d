// Testbench for fpc_word_comp: the worked examples of the FPC pattern table,
// then random words of every pattern checked against the reference model.
`include "tb_check.svh"
module tb_fpc_word_comp;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] word, code;
  logic        comp;
  logic [6:0]  len;

  fpc_word_comp dut (.word, .comp, .code, .len);

  task automatic example(logic [63:0] w, logic [63:0] c, int n);
    word = w; #1;
    `CHECK(comp && code == c && len == 7'(n), $sformatf("example %h -> %h/%0d got %h/%0d", w, c, n, code, len))
  endtask

  initial begin
    example(64'h0000000000000000, 64'h0, 3);
    example(64'h000000000000007F, 64'h17F, 11);
    example(64'hFFFFFFFFFFFFB6B6, 64'h2B6B6, 19);
    example(64'h0000000076543210, 64'h376543210, 35);
    example(64'h7654321000000000, 64'h476543210, 35);
    example(64'hFFFFBEEF00003CAB, 64'h5BEEF3CAB, 35);
    example(64'hCAFECAFECAFECAFE, 64'h6CAFE, 19);
    for (int i = 0; i < 4000; i++) begin
      bitq_t q;
      bit    c;
      logic [63:0] exp_code;
      word = gen_word(i % 8);
      #1;
      c = ref_fpc_word(word, q);
      exp_code = '0;
      foreach (q[k]) exp_code = {exp_code[62:0], q[k]};
      `CHECK(comp == c && len == 7'(q.size()) && code == exp_code,
             $sformatf("word %h: comp %0d len %0d code %h", word, comp, len, code))
    end
    `TB_DONE
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
