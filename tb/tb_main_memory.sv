// tb_main_memory: self-checking test of the LLR main memory.
//
// Fills the memory through 'mem in', then mixes random 'mem in' writes, lane
// write-backs (including several lanes on one word) and reads on all eight
// operand ports and the 'mem out' port, against a shadow array in the
// testbench that applies the documented write priority.
module tb_main_memory;
  import acs_pkg::*;

  localparam int DEPTH = 1 << AW;

  logic clk = 1'b0;
  logic mem_in_we;
  addr_t mem_in_addr, mem_out_addr;
  llr_t mem_in_data, mem_out_data;
  addr_t [LANES-1:0] rd_addr_p, rd_addr_q, wb_addr;
  llr_t  [LANES-1:0] rd_p, rd_q, wb_data;
  logic  [LANES-1:0] wb_we;
  int checks = 0, failures = 0;
  llr_t shadow [DEPTH];

  main_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    mem_in_we = 0; wb_we = '0; wb_addr = '0; wb_data = '0;
    rd_addr_p = '0; rd_addr_q = '0; mem_out_addr = '0;
    mem_in_addr = '0; mem_in_data = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      mem_in_we = 1; mem_in_addr = addr_t'(a); mem_in_data = llr_t'($urandom);
      shadow[a] = mem_in_data;
      @(negedge clk);
    end
    mem_in_we = 0;
    for (int i = 0; i < 3000; i++) begin
      // reads
      mem_out_addr = addr_t'($urandom);
      for (int l = 0; l < LANES; l++) begin
        rd_addr_p[l] = addr_t'($urandom);
        rd_addr_q[l] = addr_t'($urandom);
      end
      #1;
      check("mem out", int'(mem_out_data), int'(shadow[mem_out_addr]));
      for (int l = 0; l < LANES; l++) begin
        check("rd p", int'(rd_p[l]), int'(shadow[rd_addr_p[l]]));
        check("rd q", int'(rd_q[l]), int'(shadow[rd_addr_q[l]]));
      end
      // writes
      mem_in_we   = 1'($urandom_range(0, 1));
      mem_in_addr = addr_t'($urandom_range(0, 7));   // small range forces collisions
      mem_in_data = llr_t'($urandom);
      for (int l = 0; l < LANES; l++) begin
        wb_we[l]   = 1'($urandom_range(0, 1));
        wb_addr[l] = addr_t'($urandom_range(0, 7));
        wb_data[l] = llr_t'($urandom);
      end
      if (mem_in_we) shadow[mem_in_addr] = mem_in_data;
      for (int l = 0; l < LANES; l++) if (wb_we[l]) shadow[wb_addr[l]] = wb_data[l];
      @(negedge clk);
      mem_in_we = 0; wb_we = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
