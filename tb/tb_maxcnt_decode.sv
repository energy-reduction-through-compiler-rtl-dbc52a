// tb_maxcnt_decode: random decode groups with maxcnt and other opcodes; the
// youngest valid maxcnt must give the write, none must give no write.
module tb_maxcnt_decode;
  import cdr_pkg::*;
  localparam int unsigned DECODE_W = 4;
  logic       dec_valid [DECODE_W];
  pisa_inst_t dec_inst  [DECODE_W];
  logic       maxcnt_we;
  logic [15:0] maxcnt_val;
  int checks = 0, failures = 0, writes = 0, multi = 0;

  maxcnt_decode #(.DECODE_W(DECODE_W)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      bit exp_we; int exp_val, n;
      exp_we = 0; exp_val = 0; n = 0;
      for (int s = 0; s < DECODE_W; s++) begin
        bit is_m;
        is_m = ($urandom_range(0, 3) == 0);
        dec_valid[s] = ($urandom_range(0, 4) != 0);
        dec_inst[s].a = $urandom;
        dec_inst[s].b = $urandom;
        if (is_m) dec_inst[s].a[7:0] = 8'hF0;
        else if (dec_inst[s].a[7:0] == 8'hF0) dec_inst[s].a[7:0] = 8'h01;
        if (is_m && dec_valid[s]) begin exp_we = 1; exp_val = int'(dec_inst[s].b[15:0]); n++; end
      end
      #1;
      if (maxcnt_we !== exp_we || (exp_we && maxcnt_val !== 16'(exp_val))) begin
        failures++; $display("t=%0d we %0b val %0d, expected %0b %0d", t, maxcnt_we, maxcnt_val, exp_we, exp_val);
        foreach (dec_inst[s]) $display("  slot %0d v%0b %h", s, dec_valid[s], dec_inst[s]);
      end
      checks++;
      writes += exp_we;
      if (n > 1) multi++;
    end
    if (writes == 0 || multi == 0) failures++;
    $display("writes %0d, groups with several maxcnt %0d", writes, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
