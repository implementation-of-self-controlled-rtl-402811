// ahb_master_bfm: behavioural pipelined AHB master for the bus matrix tests.
//
// On start it generates N_BURSTS bursts into a command list and then plays
// the list with full AHB pipelining: a new address phase is issued in every
// cycle in which HREADY is high, while the previous transfer's data phase
// completes. Every burst writes 1, 4 or 8 words (SINGLE, INCR4 or INCR8) into
// this master's private area of a random slave and then reads them back;
// read data is checked against the values written. The upper address bits
// carry the slave number, priority level and transfer length: either the
// fixed cfg_plevel / cfg_tlen, or a random level per burst when cfg_rand is
// set (dynamic priority), and likewise for the length with cfg_rand_tl.
// With cfg_len above zero the master instead issues one write burst of that
// many beats (for latency tests). Options add idle gaps, locked write/read pairs and
// accesses to an unmapped slave number, whose ERROR response is checked.
module ahb_master_bfm #(
  parameter int ID      = 0,
  parameter int NS      = 4,       // slave ports of the matrix
  parameter int MAXCMD  = 4096
) (
  input  logic        hclk,
  input  logic        hresetn,
  // configuration, sampled at start
  input  logic        start,
  input  int          n_bursts,
  input  logic [2:0]  cfg_plevel,
  input  logic [3:0]  cfg_tlen,
  input  logic        cfg_rand,      // random priority level per burst
  input  logic        cfg_rand_tl,   // random transfer length per burst
  input  int          cfg_len,       // >0: one write burst of this length only
  input  logic        cfg_lock,
  input  logic        cfg_err,
  input  logic        cfg_gaps,
  input  logic [NS-1:0] cfg_slaves,  // slaves this master may use
  output logic        done,
  // AHB master port
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic        hmastlock,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic        hresp,
  // results
  output int          n_data_err,
  output int          n_reads,
  output int          n_errresp
);

  typedef struct packed {
    logic [31:0] addr;
    logic [1:0]  trans;
    logic        write;
    logic [2:0]  burst;
    logic        lock;
    logic [31:0] wdata;
    logic        exp_err;
  } cmd_t;

  cmd_t        cmds [MAXCMD];
  int          n_cmd, a_idx, d_idx;
  logic        d_valid, running;
  logic [31:0] shadow [logic [24:0]];

  task automatic push(cmd_t c);
    if (n_cmd < MAXCMD) begin
      cmds[n_cmd] = c;
      n_cmd++;
    end
  endtask

  task automatic gen();
    n_cmd = 0;
    for (int b = 0; b < n_bursts; b++) begin
      int          len, sn, word;
      logic [2:0]  pl, bt;
      logic [3:0]  tl;
      cmd_t        c;
      do sn = $urandom_range(0, NS - 1); while (!cfg_slaves[sn]);
      pl = cfg_rand ? 3'($urandom_range(0, 7)) : cfg_plevel;
      tl = cfg_rand_tl ? 4'($urandom_range(0, 3)) : cfg_tlen;
      if (cfg_len > 0) begin
        // single write burst of cfg_len beats to the first enabled slave
        sn = 0;
        while (!cfg_slaves[sn]) sn++;
        bt = (cfg_len == 4) ? 3'b011 : (cfg_len == 8) ? 3'b101 : 3'b001;
        for (int i = 0; i < cfg_len; i++) begin
          c = '0;
          c.addr  = {3'(sn), pl, tl, 22'((ID * 512 + i) * 4)};
          c.trans = (i == 0) ? 2'b10 : 2'b11;
          c.burst = bt;
          c.write = 1'b1;
          c.wdata = $urandom;
          push(c);
        end
        break;
      end
      case ($urandom_range(0, 2))
        0: begin len = 1; bt = 3'b000; end
        1: begin len = 4; bt = 3'b011; end
        default: begin len = 8; bt = 3'b101; end
      endcase
      word = ID * 512 + $urandom_range(0, 31) * 8;
      if (cfg_err && NS < 8 && $urandom_range(0, 3) == 0) begin
        c = '0;
        c.addr = {3'd7, pl, tl, 22'h40};
        c.trans = 2'b10; c.write = 1'b1; c.exp_err = 1'b1;
        push(c);
      end
      if (cfg_lock && $urandom_range(0, 2) == 0) begin
        // locked read-modify-write of one word
        logic [31:0] v, a;
        a = {3'(sn), pl, tl, 22'((word + 7) * 4)};
        c = '0; c.addr = a; c.trans = 2'b10; c.lock = 1'b1; c.write = 1'b0;
        c.wdata = shadow.exists({a[31:29], a[21:0]}) ? shadow[{a[31:29], a[21:0]}] : 32'hDEAD_0000 | 32'(word + 7);
        push(c);
        v = $urandom;
        c = '0; c.addr = a; c.trans = 2'b10; c.lock = 1'b1; c.write = 1'b1; c.wdata = v;
        shadow[{a[31:29], a[21:0]}] = v;
        push(c);
      end
      for (int rw = 0; rw < 2; rw++) begin
        for (int i = 0; i < len; i++) begin
          logic [31:0] a;
          a = {3'(sn), pl, tl, 22'((word + i) * 4)};
          c = '0;
          c.addr  = a;
          c.trans = (i == 0) ? 2'b10 : 2'b11;
          c.burst = bt;
          c.write = (rw == 0);
          if (rw == 0) begin
            c.wdata = $urandom;
            shadow[{a[31:29], a[21:0]}] = c.wdata;
          end else begin
            c.wdata = shadow[{a[31:29], a[21:0]}];   // expected read data
          end
          push(c);
        end
      end
      if (cfg_gaps && $urandom_range(0, 3) == 0)
        repeat ($urandom_range(1, 4)) begin
          c = '0;
          push(c);
        end
    end
  endtask

  // address phase
  always_comb begin
    if (running && a_idx < n_cmd) begin
      haddr     = cmds[a_idx].addr;
      htrans    = cmds[a_idx].trans;
      hwrite    = cmds[a_idx].write;
      hburst    = cmds[a_idx].burst;
      hmastlock = cmds[a_idx].lock;
    end else begin
      haddr = '0; htrans = 2'b00; hwrite = 1'b0; hburst = 3'b000; hmastlock = 1'b0;
    end
    hsize  = 3'b010;
    hwdata = (d_valid && cmds[d_idx].write) ? cmds[d_idx].wdata : 32'h0;
    done   = !running;
  end

  always @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      running <= 0; a_idx <= 0; d_idx <= 0; d_valid <= 0;
      n_data_err <= 0; n_reads <= 0; n_errresp <= 0;
    end else if (!running) begin
      if (start) begin
        gen();
        a_idx   <= 0;
        d_valid <= 0;
        running <= 1;
      end
    end else if (hready) begin
      if (d_valid) begin
        if (cmds[d_idx].exp_err) begin
          if (hresp) n_errresp <= n_errresp + 1;
          else       n_data_err <= n_data_err + 1;
        end else if (hresp) begin
          n_data_err <= n_data_err + 1;
        end else if (!cmds[d_idx].write) begin
          n_reads <= n_reads + 1;
          if (hrdata !== cmds[d_idx].wdata) begin
            n_data_err <= n_data_err + 1;
            $display("master %0d: read %h from %h, expected %h", ID, hrdata,
                     cmds[d_idx].addr, cmds[d_idx].wdata);
          end
        end
      end
      if (a_idx < n_cmd) begin
        d_valid <= cmds[a_idx].trans[1];
        d_idx   <= a_idx;
        a_idx   <= a_idx + 1;
      end else begin
        d_valid <= 0;
        if (!d_valid) running <= 0;
      end
    end
  end

endmodule
