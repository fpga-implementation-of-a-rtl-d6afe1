// GrxVideoRAM: the one-bit frame buffer (640x480) with fast clear.
//
// Pixels are stored 32 to a page in a two-port block RAM. A pixel address
// y*640 + x is split into a page address (upper bits) and a bit address
// (lower 5 bits). Because a page holds 32 pixels, a clear writes 32
// pixels per clock and empties the whole buffer in 9600 cycles.
// A single-pixel write is a read-modify-write of its page: the page last
// used is kept in a cache register, so a write to it takes one cycle (the
// modified page goes to the RAM at once, write-through), while a write to
// another page first reads that page (busy for two cycles) and then
// completes as a cached write. Writes outside 640x480 are dropped.
// The cache policy (write-through) and clipping are this design's choice.
//
// Write port: wr_en/wr_x/wr_y/wr_data; a write is taken in a cycle where
// wr_en is high and busy is low; busy also covers a clear. clear (pulse)
// starts the clear. Display port: rd_x/rd_y give rd_data one cycle later
// (reads the RAM directly, so it always sees completed writes).
module GrxVideoRAM
  import grx_pkg::*;
#(
  parameter int H_RES  = 640,
  parameter int V_RES  = 480,
  parameter int PAGE_W = 32
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   clear,
  input  logic   wr_en,
  input  coord_t wr_x,
  input  coord_t wr_y,
  input  logic   wr_data,
  output logic   busy,
  input  coord_t rd_x,
  input  coord_t rd_y,
  output logic   rd_data
);
  localparam int PIXELS = H_RES * V_RES;
  localparam int PAGES  = PIXELS / PAGE_W;
  localparam int PA_W   = $clog2(PAGES);
  localparam int BA_W   = $clog2(PAGE_W);
  localparam int AD_W   = $clog2(PIXELS);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_FILL} state_t;
  state_t state;

  logic [AD_W-1:0]   wr_addr, rd_addr;
  logic [PA_W-1:0]   wr_page, cache_page, clr_page;
  logic [BA_W-1:0]   wr_bit, rd_bit_q;
  logic [PAGE_W-1:0] cache, modified;
  logic              cache_valid, in_range, hit;

  assign wr_addr  = AD_W'(wr_y) * AD_W'(H_RES) + AD_W'(wr_x);
  assign wr_page  = wr_addr[AD_W-1:BA_W];
  assign wr_bit   = wr_addr[BA_W-1:0];
  assign in_range = (wr_x < coord_t'(H_RES)) && (wr_y < coord_t'(V_RES));
  assign hit      = cache_valid && (cache_page == wr_page);

  always_comb begin
    modified = cache;
    modified[wr_bit] = wr_data;
  end

  // RAM port A
  logic              a_we;
  logic [PA_W-1:0]   a_addr;
  logic [PAGE_W-1:0] a_wdata, a_rdata, b_rdata;
  always_comb begin
    a_we    = 1'b0;
    a_addr  = wr_page;
    a_wdata = modified;
    if (state == S_CLEAR) begin
      a_we    = 1'b1;
      a_addr  = clr_page;
      a_wdata = '0;
    end else if (state == S_IDLE && wr_en && in_range && hit) begin
      a_we = 1'b1;
    end
  end

  assign rd_addr = AD_W'(rd_y) * AD_W'(H_RES) + AD_W'(rd_x);

  GBlockRAM #(.W(PAGE_W), .DEPTH(PAGES)) u_ram (
    .clk, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_addr(rd_addr[AD_W-1:BA_W]), .b_rdata
  );

  assign busy = (state != S_IDLE) || (wr_en && in_range && !hit);

  always_ff @(posedge clk) begin
    rd_bit_q <= rd_addr[BA_W-1:0];
  end
  assign rd_data = b_rdata[rd_bit_q];

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      cache_valid <= 1'b0;
      cache_page  <= '0;
      cache       <= '0;
      clr_page    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (clear) begin
            clr_page    <= '0;
            cache_valid <= 1'b0;
            state       <= S_CLEAR;
          end else if (wr_en && in_range) begin
            if (hit) cache <= modified;
            else begin              // page read issued this cycle
              cache_page <= wr_page;
              state      <= S_FILL;
            end
          end
        end
        S_FILL: begin
          cache       <= a_rdata;
          cache_valid <= 1'b1;
          state       <= S_IDLE;
        end
        S_CLEAR: begin
          if (clr_page == PA_W'(PAGES - 1)) state <= S_IDLE;
          clr_page <= clr_page + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
