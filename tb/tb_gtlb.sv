// tb_gtlb: fills the global TLB with random region entries and checks random
// lookups against a reference translation written here: an address hits an
// entry when its page lies in [vpn, vpn+vlen); the node is the start node
// plus the (x, y, z) position of node number (page-vpn) >> log_lppn inside
// the 2^log_x by 2^log_y by 2^log_z prism, x fastest. Lowest index wins.
module tb_gtlb;
  import msg_pkg::*;
  localparam int ENTRIES = 4;
  logic clk = 0, rst_n = 0;
  logic fill_en = 0;
  logic [1:0] fill_idx = '0;
  gtlb_entry_t fill_entry = '0;
  logic lookup_en = 0;
  logic [ADDR_W-1:0] vaddr = '0;
  logic hit, miss;
  node_t node;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_multi = 0;
  gtlb_entry_t tab [ENTRIES];

  gtlb #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gtlb_entry_t rand_entry();
    gtlb_entry_t e;
    e.valid    = ($urandom_range(0, 7) != 0);
    e.vpn      = VPN_W'($urandom_range(0, 60));
    e.vlen     = VPN_W'($urandom_range(1, 40));
    e.log_lppn = LOG_W'($urandom_range(0, 2));
    e.log_x    = LOG_W'($urandom_range(0, 3));
    e.log_y    = LOG_W'($urandom_range(0, 2));
    e.log_z    = LOG_W'($urandom_range(0, 2));
    e.start.x  = COORD_W'($urandom_range(0, 20));
    e.start.y  = COORD_W'($urandom_range(0, 20));
    e.start.z  = COORD_W'($urandom_range(0, 20));
    return e;
  endfunction

  initial begin
    bit    exp_hit;
    int    nmatch;
    node_t exp_node;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      for (int i = 0; i < ENTRIES; i++) begin
        tab[i] = rand_entry();
        @(negedge clk);
        fill_en = 1; fill_idx = 2'(i); fill_entry = tab[i];
        @(negedge clk);
        fill_en = 0;
      end
      for (int k = 0; k < 100; k++) begin
        longint unsigned page, idx;
        page = longint'($urandom_range(0, 110));
        vaddr = ADDR_W'((page << PAGE_BITS) | longint'($urandom_range(0, 4095)));
        lookup_en = 1;
        exp_hit = 0; exp_node = '0; nmatch = 0;
        for (int i = ENTRIES - 1; i >= 0; i--) begin
          if (tab[i].valid && page >= tab[i].vpn && page < tab[i].vpn + tab[i].vlen) begin
            nmatch++;
            exp_hit = 1;
            idx = (page - tab[i].vpn) / (1 << tab[i].log_lppn);
            exp_node.x = COORD_W'(tab[i].start.x + (idx % (1 << tab[i].log_x)));
            exp_node.y = COORD_W'(tab[i].start.y + ((idx / (1 << tab[i].log_x)) % (1 << tab[i].log_y)));
            exp_node.z = COORD_W'(tab[i].start.z +
                         ((idx / (1 << (tab[i].log_x + tab[i].log_y))) % (1 << tab[i].log_z)));
          end
        end
        #1;
        checks++;
        if (hit !== exp_hit || miss !== !exp_hit || (exp_hit && node !== exp_node)) begin
          failures++;
          $display("FAIL page %0d: hit %0d/%0d node %p/%p", page, hit, exp_hit, node, exp_node);
        end
        if (exp_hit) n_hit++; else n_miss++;
        if (nmatch > 1) n_multi++;
        @(negedge clk);
      end
    end
    lookup_en = 0;
    #1;
    checks++;
    if (miss) begin failures++; $display("FAIL miss without lookup"); end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_multi == 0) begin failures++; $display("FAIL coverage"); end
    $display("hits %0d misses %0d multi-matches %0d", n_hit, n_miss, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
