// Testbench for fpc_word_decomp: reference FPC codes of random words, placed
// at the top of a 67-bit window with random bits below, must expand back to
// the word with the right length.
`include "tb_check.svh"
module tb_fpc_word_decomp;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        comp;
  logic [66:0] win;
  logic [63:0] word;
  logic [6:0]  len;

  fpc_word_decomp dut (.comp, .win, .word, .len);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      bitq_t q;
      logic [63:0] w;
      w    = gen_word(i % 8);
      comp = ref_fpc_word(w, q);
      win  = {$urandom(), $urandom(), 3'($urandom())};
      foreach (q[k]) win[66 - k] = q[k];
      #1;
      `CHECK(word == w && len == 7'(q.size()),
             $sformatf("word %h: got %h len %0d", w, word, len))
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
