// tb_pu_map_rom: compares all 64 entries of the partial unify mapping ROM
// with the table transcribed cell by cell as characters:
// D dereference, J bind junior to senior, A bind A to B, B bind B to A,
// E fail if A != B, F fail, N branch to pre-load address.
// Rows: operand A = bound, unbound, integer, symbol, list1, list2, struc1, struc2.
module tb_pu_map_rom;
  import libra_pkg::*;
  logic [2:0] tag_a, tag_b; uact_e act;
  int checks = 0, failures = 0;
  string tbl [8] = '{"DDDDDDDD", "DJAAAAAA", "DBEFFFFF", "DBFEFFFF",
                     "DBFFNNFF", "DBFFNNFF", "DBFFFFNN", "DBFFFFNN"};
  pu_map_rom dut (.*);
  function automatic uact_e dec(byte c);
    case (c)
      "D": return U_DEREF;   "J": return U_BIND_JS; "A": return U_BIND_AB; "B": return U_BIND_BA;
      "E": return U_FAIL_NE; "N": return U_PRELOAD; default: return U_FAIL;
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
      tag_a = 3'(i); tag_b = 3'(j); #1; checks++;
      if (act !== dec(tbl[i][j])) begin failures++; $display("FAIL a=%0d b=%0d got %s", i, j, act.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
