// tb_alu: checks every ALU function against its arithmetic definition on
// random and corner-case operands.
// Combinational; each vector is checked 1 ns after it is applied. The
// operation list follows the document's ALU; the FSEL codes are this design's.
`timescale 1ns / 1ps
module tb_alu;
  import mips_pkg::*;
  word_t a, b, y;
  fsel_e fsel;
  int checks = 0, failures = 0;
  alu dut (.a(a), .b(b), .fsel(fsel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_y(word_t x, word_t z, fsel_e f);
    case (f)
      FSEL_ADD: return x + z;
      FSEL_SUB: return x + ~z + 1;
      FSEL_AND: return x & z;
      FSEL_OR:  return x | z;
      FSEL_XOR: return x ^ z;
      FSEL_LUI: return z * 65536;
      default:  return 'x;
    endcase
  endfunction

  initial begin
    fsel_e fl [6] = '{FSEL_ADD, FSEL_SUB, FSEL_AND, FSEL_OR, FSEL_XOR, FSEL_LUI};
    for (int i = 0; i < 3000; i++) begin
      a = (i % 7 == 0) ? 32'hffff_ffff : $urandom;
      b = (i % 11 == 0) ? 32'h8000_0000 : $urandom;
      fsel = fl[i % 6];
      #1;
      checks++;
      if (y !== ref_y(a, b, fsel)) begin
        failures++;
        $display("FAIL fsel=%s a=%h b=%h y=%h", fsel.name(), a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
