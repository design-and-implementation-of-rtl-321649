// bus_io: system-bus interface ("I/O") of the search building block.
//
// A simple word-addressed register bus: a write takes effect on the clock
// edge where bus_we is high; a read issued with bus_re returns bus_rdata
// with bus_rvalid one cycle later. Address map (12-bit word addresses):
//   0x000 CTRL    W: [0] start [1] stop [2] load LFSR seed [3] clear statistics
//                 R: [0] busy [1] found
//   0x001 CONFIG  search_cfg_t fields (see sha1_pkg), R/W
//   0x002 SEED    LFSR seed, R/W
//   0x003 ROUND   R: last step evaluated (the found step after a success)
//   0x004/6/8/A   R: trials, elementary operations, reseeds, found pairs (lo, hi)
//   0x200-0x3FF   W-part characteristic, row*4 + field, R/W
//   0x400-0x5FF   A-part characteristic, row*4 + field (row r = A(r-4)), R/W
//   0x600-0x60F   stored words of lane 1, 0x610-0x61F lane 2, R/W (the
//                 message, or the W window W(s-16).. for a start step s > 16)
//   0x800-0x8FF   AP masks of lane 1, path*16 + word, W
//   0x900-0x9FF   AP masks of lane 2, W
//   0xA00-0xA9F   per-step execution counters N(i), step*2 + {lo, hi}, R
// Memories should be read and written only while the search is idle; their
// ports then follow the bus (mem_* outputs). The bus protocol and the map
// are this design's choice.
module bus_io
  import sha1_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] bus_addr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_we,
  input  logic        bus_re,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  // control and configuration
  output logic        start_p,
  output logic        stop_p,
  output logic        seed_load_p,
  output logic        stat_clear_p,
  output logic [31:0] seed,
  output search_cfg_t cfg,
  // memory write strobes, shared address and data
  output logic        wchar_we,
  output logic        achar_we,
  output logic        msg1_we,
  output logic        msg2_we,
  output logic        ap1_we,
  output logic        ap2_we,
  output logic [6:0]  mem_row,
  output cond_field_e mem_field,
  output logic [3:0]  mem_word,
  output logic [3:0]  mem_path,
  output logic [31:0] mem_wdata,
  // read data
  input  logic        busy,
  input  logic        found,
  input  logic [6:0]  last_round,
  input  logic [63:0] trials,
  input  logic [63:0] eos,
  input  logic [63:0] reseeds,
  input  logic [63:0] founds,
  input  logic [63:0] n_count,
  input  cond_t       wchar_rdata,
  input  cond_t       achar_rdata,
  input  word_t       msg1_rdata,
  input  word_t       msg2_rdata
);
  logic [3:0]  page;
  logic [31:0] cfg_word, rd;

  assign page      = bus_addr[11:8];
  assign mem_field = cond_field_e'(bus_addr[1:0]);
  assign mem_word  = bus_addr[3:0];
  assign mem_path  = bus_addr[7:4];
  assign mem_wdata = bus_wdata;

  // row index of the addressed characteristic or statistics entry
  always_comb begin
    unique case (page)
      PG_WCHAR, PG_WCHAR2, PG_ACHAR, PG_ACHAR2: mem_row = bus_addr[8:2];
      PG_STAT:                                  mem_row = bus_addr[7:1];
      default:                                  mem_row = '0;
    endcase
  end

  always_comb begin
    start_p      = bus_we && bus_addr == A_CTRL && bus_wdata[0];
    stop_p       = bus_we && bus_addr == A_CTRL && bus_wdata[1];
    seed_load_p  = bus_we && bus_addr == A_CTRL && bus_wdata[2];
    stat_clear_p = bus_we && bus_addr == A_CTRL && bus_wdata[3];
    wchar_we     = bus_we && (page == PG_WCHAR || page == PG_WCHAR2);
    achar_we     = bus_we && (page == PG_ACHAR || page == PG_ACHAR2);
    msg1_we      = bus_we && page == PG_MSG && bus_addr[7:4] == 4'h0;
    msg2_we      = bus_we && page == PG_MSG && bus_addr[7:4] == 4'h1;
    ap1_we       = bus_we && page == PG_AP1;
    ap2_we       = bus_we && page == PG_AP2;
  end

  assign cfg_word = {4'b0, cfg.enum_word, 4'b0, cfg.check_a, cfg.check_w, cfg.seg_en,
                     cfg.ap_en, 1'b0, cfg.end_round, 1'b0, cfg.start_round};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.start_round <= 7'd0;
      cfg.end_round   <= 7'd79;
      cfg.ap_en       <= 1'b0;
      cfg.seg_en      <= 1'b0;
      cfg.check_w     <= 1'b1;
      cfg.check_a     <= 1'b1;
      cfg.enum_word   <= 4'd0;
      seed            <= 32'h1;
    end else if (bus_we) begin
      if (bus_addr == A_CONFIG) begin
        cfg.start_round <= bus_wdata[6:0];
        cfg.end_round   <= bus_wdata[14:8];
        cfg.ap_en       <= bus_wdata[16];
        cfg.seg_en      <= bus_wdata[17];
        cfg.check_w     <= bus_wdata[18];
        cfg.check_a     <= bus_wdata[19];
        cfg.enum_word   <= bus_wdata[27:24];
      end
      if (bus_addr == A_SEED) seed <= bus_wdata;
    end
  end

  function automatic word_t field_of(input cond_t c, input logic [1:0] f);
    unique case (f)
      2'd0:    return c.dmask;
      2'd1:    return c.dval;
      2'd2:    return c.vmask;
      default: return c.vval;
    endcase
  endfunction

  always_comb begin
    rd = '0;
    unique case (page)
      4'h0: begin
        unique case (bus_addr)
          A_CTRL:          rd = {30'b0, found, busy};
          A_CONFIG:        rd = cfg_word;
          A_SEED:          rd = seed;
          A_ROUND:         rd = {25'b0, last_round};
          A_TRIALS:        rd = trials[31:0];
          A_TRIALS + 1:    rd = trials[63:32];
          A_EOS:           rd = eos[31:0];
          A_EOS + 1:       rd = eos[63:32];
          A_RESEEDS:       rd = reseeds[31:0];
          A_RESEEDS + 1:   rd = reseeds[63:32];
          A_FOUNDS:        rd = founds[31:0];
          A_FOUNDS + 1:    rd = founds[63:32];
          default:         rd = '0;
        endcase
      end
      PG_WCHAR, PG_WCHAR2: rd = field_of(wchar_rdata, bus_addr[1:0]);
      PG_ACHAR, PG_ACHAR2: rd = field_of(achar_rdata, bus_addr[1:0]);
      PG_MSG:              rd = bus_addr[4] ? msg2_rdata : msg1_rdata;
      PG_STAT:             rd = bus_addr[0] ? n_count[63:32] : n_count[31:0];
      default:             rd = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_re;
      if (bus_re) bus_rdata <= rd;
    end
  end
endmodule
