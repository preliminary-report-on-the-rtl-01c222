// tb_nc_stack_ctl: self-checking test of the top-of-stack register and stack
// pointer unit together with a 256 x 16 stack memory.
//
// Performs random pushes, pops and loads and compares the register value,
// the pointer and every popped value with a queue kept by the testbench.
// Also pushes past 256 entries to check that the pointer wraps.
module tb_nc_stack_ctl;
  logic        clk = 0, rst_n = 0;
  logic        push, pop, load;
  logic [15:0] din, top, st_wdata, st_rdata;
  logic [7:0]  sp, st_addr;
  logic        st_we;
  int checks = 0, failures = 0;
  logic [15:0] model[$];   // model[$] is the top register, the rest below it
  logic [7:0]  exp_sp;

  always #5 clk = ~clk;

  nc_stack_ctl #(.W(16), .AW(8)) dut (.clk, .rst_n, .push, .pop, .load, .din, .top, .sp,
                                      .st_addr, .st_wdata, .st_we, .st_rdata);
  nc_stack_ram #(.W(16), .DEPTH(256)) ram (.clk, .addr(st_addr), .wdata(st_wdata),
                                           .we(st_we), .rdata(st_rdata));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op;
    push = 0; pop = 0; load = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model.push_back(16'd0);
    exp_sp = 0;
    @(negedge clk);
    check("reset top", top, 0);
    check("reset sp", sp, 0);
    for (int k = 0; k < 2000; k++) begin
      op = (k < 300) ? 0 : int'($urandom_range(0, 2));
      din = 16'($urandom);
      push = (op == 0);
      pop  = (op == 1) && model.size() > 1;
      load = (op == 2);
      @(negedge clk);
      if (push) begin model.push_back(din); exp_sp++; end
      else if (pop) begin void'(model.pop_back()); exp_sp--; end
      else if (load) model[model.size()-1] = din;
      if (model.size() > 257) model.delete(0);   // memory holds 256 words
      push = 0; pop = 0; load = 0;
      #1;
      check("top", top, model[model.size()-1]);
      check("sp", sp, exp_sp);
    end
    // drain and compare every remaining word
    while (model.size() > 1) begin
      pop = 1;
      @(negedge clk);
      void'(model.pop_back());
      check("drained top", top, model[model.size()-1]);
    end
    pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
