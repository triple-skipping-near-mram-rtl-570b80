// tb_mram_pingpong_buffer -- self-checking test of the ping-pong activation
// buffer. Writes random activation vectors (some all zero) into both banks
// and reads back every bit-plane, comparing with planes computed from the
// written vector. Checks that a zero vector only sets the flag cells (the old
// data stays, wr_data_en is 0), that the two banks are independent, that a
// write to one bank in the same cycle as a read of the other is safe, and
// that the sensed plane holds while sensing is off.
module tb_mram_pingpong_buffer;
  import tsnmc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we, wbank, wflag, wr_data_en, rbank, sae_flag, sae_data, flag_q;
  logic [2:0] rrow;
  vec_t wdata;
  plane_t plane_q;

  mram_pingpong_buffer dut (.*);

  vec_t ref_data [2];
  logic ref_flag [2];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write_vec(int b, vec_t d);
    @(negedge clk);
    we = 1; wbank = b[0]; wdata = d; wflag = (d == '0);
    #1 chk(wr_data_en == (d != '0), "wr_data_en");
    @(negedge clk);
    we = 0;
    ref_flag[b] = (d == '0);
    if (d != '0) ref_data[b] = d;
  endtask

  task automatic read_bank(int b);
    for (int m = DATA_W - 1; m >= 0; m--) begin
      @(negedge clk);
      rbank = b[0]; rrow = 3'(m); sae_flag = 1; sae_data = 1;
      @(negedge clk);
      sae_flag = 0; sae_data = 0;
      chk(flag_q == ref_flag[b], $sformatf("flag bank %0d row %0d", b, m));
      chk(plane_q == bit_plane(ref_data[b], m),
          $sformatf("plane bank %0d row %0d: %b vs %b", b, m, plane_q, bit_plane(ref_data[b], m)));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; wflag = 0; rbank = 0; rrow = '0; sae_flag = 0; sae_data = 0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_vec(0, {$urandom, $urandom} | 64'h1);   // both banks hold known data
    write_vec(1, {$urandom, $urandom} | 64'h1);
    for (int t = 0; t < 40; t++) begin
      automatic int b = t % 2;
      automatic vec_t v = {$urandom, $urandom};
      if (t < 2) v = v | 64'h8040201008040201;   // banks start with known data
      else if (t % 5 == 0) v = '0;
      write_vec(b, v);
      read_bank(0);
      read_bank(1);
    end
    // write bank 1 while sensing bank 0 in the same cycle
    begin
      automatic vec_t v = {$urandom, $urandom} | 64'h1;
      @(negedge clk);
      we = 1; wbank = 1; wdata = v; wflag = 0;
      rbank = 0; rrow = 3'd3; sae_data = 1; sae_flag = 1;
      @(negedge clk);
      we = 0; sae_data = 0; sae_flag = 0;
      chk(plane_q == bit_plane(ref_data[0], 3), "read bank 0 during write of bank 1");
      ref_data[1] = v; ref_flag[1] = 0;
      read_bank(1);
      // hold
      @(negedge clk); rrow = 3'd0; rbank = 0;
      repeat (2) @(negedge clk);
      chk(plane_q == bit_plane(ref_data[1], 0), "plane held while sensing is off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
