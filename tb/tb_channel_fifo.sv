// Self-checking test of channel_fifo: random pushes and pops against a
// reference queue. Checks the order and content of every beat, that in_ready
// drops exactly when DEPTH beats are held, that out_valid drops exactly when
// none are, and that a beat written in one cycle is readable in the next.
module tb_channel_fifo;

  localparam int DEPTH = 5;
  typedef struct packed { logic [15:0] tag; logic [31:0] data; } beat_t;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  beat_t in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;
  beat_t model [$];
  bit    stalled = 1'b0;   // the last edge saw in_valid with in_ready low

  always #5 clk = ~clk;

  channel_fifo #(.T(beat_t), .DEPTH(DEPTH)) dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int push_pct;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // phases that favour filling, draining and balance
      push_pct = (cyc / 1000) % 3 == 0 ? 80 : (cyc / 1000) % 3 == 1 ? 20 : 50;
      @(negedge clk);
      checks += 3;
      if (in_ready !== (model.size() < DEPTH)) fail($sformatf("in_ready=%b with %0d held", in_ready, model.size()));
      if (out_valid !== (model.size() > 0)) fail($sformatf("out_valid=%b with %0d held", out_valid, model.size()));
      if (int'(level) != model.size()) fail($sformatf("level=%0d with %0d held", level, model.size()));
      if (out_valid) begin
        checks++;
        if (out_data !== model[0]) fail($sformatf("head %h, expected %h", out_data, model[0]));
      end
      // keep a stalled beat unchanged, as the channel protocol requires
      if (!stalled) begin
        in_valid = ($urandom_range(0, 99) < push_pct);
        in_data  = {16'(cyc), 32'($urandom)};
      end
      out_ready = ($urandom_range(0, 99) >= push_pct);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model update on each clock edge
  always @(posedge clk) begin
    stalled <= in_valid && !in_ready;
    if (rst_n) begin
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
  end

endmodule
