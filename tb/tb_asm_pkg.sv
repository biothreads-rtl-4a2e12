// tb_asm_pkg: a tiny assembler for the testbenches. A program is built
// bundle by bundle; b() appends the syllables of one bundle and sets the stop
// bit on its last syllable, here() gives the syllable address of the next
// bundle, and patch() fills in a branch target once it is known. A program
// object built for a narrower machine (new(2)) cuts every bundle into pieces
// of at most that many syllables, in order, so the same program text runs on
// a 2-wide core as long as no piece reads a register written by an earlier
// piece of the same bundle.
package tb_asm_pkg;
  import bt_pkg::*;

  class prog_c;
    syl_t code [$];
    int   nbundles = 0;
    int   width = 4;

    function new(int w = 4);
      width = w;
    endfunction

    function int here();
      return code.size();
    endfunction

    // append one bundle; returns the address of its first syllable
    function int b(syl_t s []);
      int at;
      at = code.size();
      foreach (s[i]) begin
        code.push_back(s[i]);
        if (i % width == width - 1 || i == s.size() - 1) begin
          code[code.size() - 1][31] = 1'b1;
          nbundles++;
        end
      end
      return at;
    endfunction

    function void patch(int at, int target);
      code[at][18:0] = 19'(target);
    endfunction
  endclass
endpackage
