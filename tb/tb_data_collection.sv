// tb_data_collection: self-checking test of the result-acquisition buffer.
// Random committed and uncommitted stores; checks the logged entries (with
// wrap-around of the circular buffer) and the store count.
module tb_data_collection;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, commit, store, sel_b;
  logic [31:0] addr, data;
  logic [3:0]  idx;
  logic [64:0] entry;
  logic [15:0] count;
  logic [64:0] model [DEPTH];
  int wp, cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_collection #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .commit(commit), .store(store),
    .sel_b(sel_b), .addr(addr), .data(data), .rd_idx(idx), .rd_entry(entry), .count(count));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    commit = 0; store = 0; sel_b = 0; addr = 0; data = 0; idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wp = 0; cnt = 0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      commit = 1'($urandom); store = 1'($urandom); sel_b = 1'($urandom);
      addr = $urandom; data = $urandom; idx = 4'($urandom);
      #1;
      checks++;
      if (entry !== model[idx] || count !== 16'(cnt)) begin
        failures++;
        if (failures < 10) $display("n=%0d idx=%0d entry=%h exp %h count=%0d exp %0d", n, idx, entry, model[idx], count, cnt);
      end
      @(posedge clk);
      if (commit && store) begin
        model[wp] = {sel_b, addr, data};
        wp = (wp + 1) % DEPTH;
        cnt++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
