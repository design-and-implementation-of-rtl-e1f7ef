// tb_context_memory: self-checking test of the context memory.
//
// Random host writes and update writes, sometimes in the same cycle (the
// host write must win), against a reference array; the asynchronous read
// port is compared with the reference every cycle.
module tb_context_memory;
  import cabac_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ctx_idx_t rd_idx = '0, upd_idx = '0, host_idx = '0;
  ctx_t     rd_data, upd_data = '0, host_data = '0;
  logic     upd_we = 1'b0, host_we = 1'b0;
  ctx_t     ref_mem [NUM_CTX];

  context_memory dut (.*);

  initial begin
    // Fill everything through the host port first.
    for (int i = 0; i < NUM_CTX; i++) begin
      @(negedge clk);
      host_we   = 1'b1;
      host_idx  = 7'(i);
      host_data = 7'($urandom_range(0, 127));
      ref_mem[i] = host_data;
    end
    @(negedge clk);
    host_we = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      rd_idx = 7'($urandom_range(0, NUM_CTX - 1));
      #1;
      checks++;
      if (rd_data != ref_mem[rd_idx]) begin
        failures++;
        if (failures < 10) $display("read %0d: got %h expected %h", rd_idx, rd_data, ref_mem[rd_idx]);
      end
      upd_we    = 1'($urandom_range(0, 1));
      upd_idx   = 7'($urandom_range(0, NUM_CTX - 1));
      upd_data  = 7'($urandom_range(0, 127));
      host_we   = ($urandom_range(0, 7) == 0);
      host_idx  = ($urandom_range(0, 1)) ? upd_idx : 7'($urandom_range(0, NUM_CTX - 1));
      host_data = 7'($urandom_range(0, 127));
      @(posedge clk);
      if (host_we) ref_mem[host_idx] = host_data;
      else if (upd_we) ref_mem[upd_idx] = upd_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
