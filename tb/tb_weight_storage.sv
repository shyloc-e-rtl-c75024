// tb_weight_storage: loads custom vectors for Nz bands, then cycles through the
// bands writing updated vectors back, and checks that each band's vector comes
// out Nz steps after it was written, from the custom path first and from the
// update path afterwards; then restarts with a different Nz.
`timescale 1ns/1ps
module tb_weight_storage;
  localparam int VW = 96, NZM = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic restart, load, adv;
  logic [4:0] nz;
  logic [VW-1:0] load_vec, upd_vec, rd_vec;
  int checks = 0, failures = 0;

  weight_storage #(.VW(VW), .NZ_MAX(NZM)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int n);
    logic [VW-1:0] model[];
    model = new[n];
    @(negedge clk) begin restart = 1; nz = 5'(n); end
    @(negedge clk) restart = 0;
    for (int z = 0; z < n; z++) begin
      model[z] = {$urandom, $urandom, $urandom};
      load = 1; load_vec = model[z];
      @(negedge clk);
    end
    load = 0;
    for (int step = 0; step < 6 * n; step++) begin
      int z = step % n;
      checks++;
      if (rd_vec != model[z]) begin failures++; $display("band %0d wrong", z); end
      model[z] = {$urandom, $urandom, $urandom};
      adv = 1; upd_vec = model[z];
      @(negedge clk);
      adv = 0;
      if ($urandom % 2) @(negedge clk);
    end
  endtask

  initial begin
    restart = 0; load = 0; adv = 0; nz = 0; load_vec = '0; upd_vec = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(7); run(16); run(1); run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
