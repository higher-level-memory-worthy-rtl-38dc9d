// tb_codeword_memory: self-checking test of the codeword storage array.
//
// Writes every word, reads it back through the asynchronous read port,
// applies upset masks and checks that exactly the masked bits flip, and
// checks a write and an upset of the same word in one cycle, at the default
// size (32 words of 68 bits). A shadow copy
// in the testbench gives the expected contents.
module tb_codeword_memory;

  localparam int W = 68;
  localparam int D = 32;

  logic         clk = 0;
  logic         we, upset_en;
  logic [4:0]   waddr, raddr, upset_addr;
  logic [W-1:0] wdata, rdata, upset_mask;
  logic [W-1:0] shadow [D];

  int checks = 0;
  int failures = 0;

  codeword_memory dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask)
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    return {4'($urandom), $urandom, $urandom};
  endfunction

  task automatic check_all();
    for (int a = 0; a < D; a++) begin
      raddr = 5'(a);
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("FAIL addr %0d got %h want %h", a, rdata, shadow[a]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; upset_en = 0; waddr = '0; raddr = '0; upset_addr = '0; wdata = '0; upset_mask = '0;
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = 5'(a); wdata = rnd(); shadow[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    check_all();
    // upsets
    for (int i = 0; i < 100; i++) begin
      upset_en = 1; upset_addr = 5'($urandom_range(0, D-1)); upset_mask = rnd();
      shadow[upset_addr] ^= upset_mask;
      @(negedge clk);
    end
    upset_en = 0;
    check_all();
    // write and upset of the same word, and of different words, together
    for (int i = 0; i < 50; i++) begin
      we = 1; waddr = 5'($urandom_range(0, D-1)); wdata = rnd();
      upset_en = 1; upset_addr = (i % 2 == 0) ? waddr : 5'($urandom_range(0, D-1));
      upset_mask = rnd();
      if (upset_addr == waddr) shadow[waddr] = wdata ^ upset_mask;
      else begin
        shadow[waddr] = wdata;
        shadow[upset_addr] ^= upset_mask;
      end
      @(negedge clk);
    end
    we = 0; upset_en = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
