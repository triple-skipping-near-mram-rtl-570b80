// tb_sparse_flag_gen -- self-checking test of the sparse flag generator.
// Checks the 64-bit default size and odd/small sizes (2, 7, 13 bits), which
// exercise the pass-through of the odd bit, against flag = (word == 0), using
// all-zero words, single set bits in every position and random words.
module tb_sparse_flag_gen;
  int checks = 0, failures = 0;

  logic [63:0] d64;  logic f64;
  logic [12:0] d13;  logic f13;
  logic [6:0]  d7;   logic f7;
  logic [1:0]  d2;   logic f2;

  sparse_flag_gen                dut64 (.data(d64), .flag(f64));
  sparse_flag_gen #(.N_BITS(13)) dut13 (.data(d13), .flag(f13));
  sparse_flag_gen #(.N_BITS(7))  dut7  (.data(d7),  .flag(f7));
  sparse_flag_gen #(.N_BITS(2))  dut2  (.data(d2),  .flag(f2));

  task automatic check_all();
    #1;
    checks += 4;
    if (f64 !== (d64 == '0)) begin failures++; $display("FAIL 64: data=%h flag=%b", d64, f64); end
    if (f13 !== (d13 == '0)) begin failures++; $display("FAIL 13: data=%h flag=%b", d13, f13); end
    if (f7  !== (d7  == '0)) begin failures++; $display("FAIL 7: data=%h flag=%b", d7, f7); end
    if (f2  !== (d2  == '0)) begin failures++; $display("FAIL 2: data=%h flag=%b", d2, f2); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d64 = '0; d13 = '0; d7 = '0; d2 = '0;
    check_all();
    for (int b = 0; b < 64; b++) begin
      d64 = 64'd1 << b; d13 = 13'd1 << (b % 13); d7 = 7'd1 << (b % 7); d2 = 2'd1 << (b % 2);
      check_all();
    end
    for (int t = 0; t < 500; t++) begin
      d64 = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      d13 = 13'($urandom) & 13'($urandom);
      d7  = 7'($urandom) & 7'($urandom);
      d2  = 2'($urandom);
      if (t % 5 == 0) d64 = '0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
