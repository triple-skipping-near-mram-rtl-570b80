// tb_shift_adder_tree -- self-checking test of the shift adder tree.
// Single steps are compared with sum_k plane[k]*w_k + 2*psum computed in the
// testbench; then eight steps, most significant activation bit-plane first,
// are chained and compared with the dot product of unsigned activations and
// signed weights, including extreme values. zero_out must force 0.
module tb_shift_adder_tree;
  import tsnmc_pkg::*;

  int checks = 0, failures = 0;

  plane_t plane;
  vec_t   weights;
  psum_t  psum_in, sum_out;
  logic   zero_out;

  shift_adder_tree dut (.*);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint ref_step(plane_t p, vec_t w, longint ps);
    longint s = 2 * ps;
    for (int k = 0; k < VEC_LEN; k++)
      if (p[k]) s += longint'(signed'(w[DATA_W*k +: DATA_W]));
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    zero_out = 0;
    for (int t = 0; t < 300; t++) begin
      plane = VEC_LEN'($urandom); weights = {$urandom, $urandom};
      psum_in = PSUM_W'($signed($urandom % 200000) - 100000);
      #1;
      chk(longint'(sum_out) == ref_step(plane, weights, longint'(psum_in)),
          $sformatf("step: got %0d want %0d", sum_out, ref_step(plane, weights, longint'(psum_in))));
    end
    // full bit-serial products
    for (int t = 0; t < 200; t++) begin
      automatic vec_t a = {$urandom, $urandom};
      automatic longint dot = 0;
      weights = {$urandom, $urandom};
      if (t == 0) begin a = '1; weights = {8{8'h80}}; end       // most negative
      if (t == 1) begin a = '1; weights = {8{8'h7f}}; end       // most positive
      for (int k = 0; k < VEC_LEN; k++)
        dot += longint'(a[DATA_W*k +: DATA_W]) * longint'(signed'(weights[DATA_W*k +: DATA_W]));
      psum_in = '0;
      for (int m = DATA_W - 1; m >= 0; m--) begin
        plane = bit_plane(a, m);
        #1 psum_in = sum_out;
      end
      chk(longint'(psum_in) == dot, $sformatf("dot: got %0d want %0d", psum_in, dot));
    end
    zero_out = 1;
    for (int t = 0; t < 20; t++) begin
      plane = '1; weights = {$urandom, $urandom} | 64'h0101010101010101; psum_in = 12345;
      #1 chk(sum_out == '0, "zero_out forces 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
