// Testbench of the result writer. Two instances, packed 32-bit and 8-bit,
// receive the same random result streams (random gaps, random memory wait
// states, aligned and unaligned base addresses, lengths not a multiple of
// four). A memory model applies the byte enables; every result byte must
// land at base + n, nothing else may be written, the number of transfers
// must be ceil-per-word (packed) or one per result (8-bit), and `done` must
// pulse once, after the last transfer.
module tb_morph_master_writer;
  import morph_pkg::*;
  localparam int MEMSZ = 1024;
  logic clk = 1'b0, reset_n = 1'b1, clear = 1'b0;
  logic [31:0] dest = '0;
  logic res_valid = 1'b0, res_last = 1'b0;
  pix_t res = '0;
  logic        can_accept [2], done [2], avm_write [2];
  logic [31:0] avm_address [2], avm_writedata [2];
  logic [3:0]  avm_byteenable [2];
  logic        avm_waitrequest [2];
  logic [7:0]  mem [2][MEMSZ];
  int n_xfer [2], n_done [2];
  int checks = 0, failures = 0, wait_pct = 0;

  always #5 clk = ~clk;

  morph_master_writer #(.PACK32(1'b1)) u_w32 (.clk, .reset_n, .clear, .dest, .res_valid, .res,
    .res_last, .can_accept(can_accept[0]), .done(done[0]), .avm_address(avm_address[0]),
    .avm_write(avm_write[0]), .avm_writedata(avm_writedata[0]),
    .avm_byteenable(avm_byteenable[0]), .avm_waitrequest(avm_waitrequest[0]));
  morph_master_writer #(.PACK32(1'b0)) u_w8 (.clk, .reset_n, .clear, .dest, .res_valid, .res,
    .res_last, .can_accept(can_accept[1]), .done(done[1]), .avm_address(avm_address[1]),
    .avm_write(avm_write[1]), .avm_writedata(avm_writedata[1]),
    .avm_byteenable(avm_byteenable[1]), .avm_waitrequest(avm_waitrequest[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_mem
    always @(posedge clk) begin
      if (avm_write[g] && !avm_waitrequest[g]) begin
        n_xfer[g]++;
        for (int b = 0; b < 4; b++)
          if (avm_byteenable[g][b]) mem[g][{avm_address[g][31:2], 2'b00} + b] <= avm_writedata[g][8*b +: 8];
        if (g == 1) check(avm_address[g][1:0] == 2'b00 || avm_byteenable[g] == 4'b0001 << avm_address[g][1:0],
                          "8-bit transfer enables the addressed byte");
      end
      if (done[g]) n_done[g]++;
      avm_waitrequest[g] <= ($urandom_range(99) < wait_pct);
    end
  end

  task automatic stream(input int base, input int len, input int wpct);
    logic [7:0] exp [];
    int words;
    exp = new[len];
    dest = base;
    wait_pct = wpct;
    for (int g = 0; g < 2; g++) begin
      n_xfer[g] = 0; n_done[g] = 0;
      for (int i = 0; i < MEMSZ; i++) mem[g][i] = 8'h5A;
    end
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    for (int n = 0; n < len; n++) begin
      while (!(can_accept[0] && can_accept[1])) @(negedge clk);
      exp[n] = 8'($urandom);
      res = exp[n]; res_valid = 1'b1; res_last = (n == len - 1);
      @(negedge clk);
      res_valid = 1'b0; res_last = 1'b0;
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
    for (int k = 0; k < 200 && !(n_done[0] && n_done[1]); k++) @(negedge clk);
    repeat (3) @(negedge clk);
    words = ((base + len + 3) / 4) - (base / 4);
    for (int g = 0; g < 2; g++) begin
      check(n_done[g] == 1, $sformatf("done once (%0d)", g));
      check(!avm_write[g], "queue empty after done");
      for (int n = 0; n < len; n++)
        check(mem[g][base + n] == exp[n], $sformatf("inst %0d byte %0d", g, n));
      check(mem[g][base - 1] == 8'h5A && mem[g][base + len] == 8'h5A, "no stray writes");
    end
    check(n_xfer[0] == words, $sformatf("packed transfers %0d exp %0d", n_xfer[0], words));
    check(n_xfer[1] == len, "one 8-bit transfer per result");
  endtask

  initial begin
    #1 reset_n = 1'b0;
    #3 reset_n = 1'b1;
    @(negedge clk);
    stream(64, 16, 0);
    stream(129, 13, 30);
    stream(258, 7, 60);
    stream(400, 1, 50);
    stream(512, 101, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
